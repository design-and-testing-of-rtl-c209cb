// tb_dds: runs DDSs at harmonics 1 and 3 from one phase increment word.
// Checks on every clock that (lo_cos, lo_sin) matches the cosine and sine of
// the reported phase (+/-6 LSB), that the phase advances by HARM*piw/2^16
// each clock (rounded either way), and that the 3fo phase stays exactly
// three times the fo phase (coherence), at two different words.
module tb_dds;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic [31:0] piw = 32'd416611827;
  logic signed [15:0] c1, s1, c3, s3;
  logic [15:0] p1, p3;
  int checks = 0, failures = 0;
  dds #(.HARM(1)) u1 (.clk, .rst_n, .piw, .lo_cos(c1), .lo_sin(s1), .phase(p1));
  dds #(.HARM(3)) u3 (.clk, .rst_n, .piw, .lo_cos(c3), .lo_sin(s3), .phase(p3));

  function automatic bit near(int v, real e, real tol);
    return (real'(v) - e) <= tol && (e - real'(v)) <= tol;
  endfunction

  localparam real A = 32760.0, TWO_PI = 6.283185307179586;
  logic [15:0] p1_prev, p3_prev;

  task automatic run(input int cycles);
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      checks++;
      if (!near(c1, A * $cos(TWO_PI * real'(p1) / 65536.0), 6.0) || !near(s1, A * $sin(TWO_PI * real'(p1) / 65536.0), 6.0) ||
          !near(c3, A * $cos(TWO_PI * real'(p3) / 65536.0), 6.0) || !near(s3, A * $sin(TWO_PI * real'(p3) / 65536.0), 6.0)) begin
        failures++;
        if (failures < 5) $display("LO mismatch at phase %0d: %0d %0d", p1, c1, s1);
      end
      if (n > 0) begin
        automatic int d1 = int'(16'(p1 - p1_prev));
        automatic int d3 = int'(16'(p3 - p3_prev));
        automatic int e1 = int'(piw >> 16);
        automatic int e3 = int'((32'(3 * piw)) >> 16);
        checks++;
        if ((d1 != e1 && d1 != e1 + 1) || (d3 != e3 && d3 != e3 + 1)) begin
          failures++;
          if (failures < 5) $display("step mismatch %0d %0d exp %0d %0d", d1, d3, e1, e3);
        end
      end
      checks++;
      if (int'(16'(p3 - 16'(3 * p1))) > 2) begin  // p3 = top bits of 3*acc
        failures++;
        if (failures < 5) $display("coherence mismatch %0d %0d", p1, p3);
      end
      p1_prev = p1;
      p3_prev = p3;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);
    run(3000);
    piw <= 32'd1234567891;
    repeat (20) @(posedge clk);
    run(3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
