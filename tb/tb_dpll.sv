// tb_dpll: closed-loop test of the digital PLL.
// 1. External reference: a square wave from the testbench's own phase
//    accumulator, 3000 LSB (about 87 Hz) above the software word. After
//    settling, the DPLL's word must average within 40 LSB of the reference's
//    and the phase error must sit near zero.
// 2. Pick-up source (free-running SEL): the testbench models the chain
//    phase as (cavity accumulator - DDS accumulator driven by the DPLL
//    word) and presents it every 64 clocks; the word must converge onto the
//    cavity's, 2000 LSB below the software word.
// 3. Disabled: the word must equal the software word.
module tb_dpll;
  import llrf_pkg::*;
  localparam logic [31:0] P0 = 32'd416611827;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic ext_ref = 1'b0, use_pu = 1'b0, pu_valid = 1'b0, en = 1'b0;
  logic [15:0] pu_ph = '0;
  logic [31:0] piw_base = P0;
  gains_t g;
  logic [31:0] piw;
  logic [15:0] ph_err;
  logic upd;
  int checks = 0, failures = 0, n_upd = 0;
  dpll #(.HARM(3), .DEC_LOG(6)) dut (.*, .ph_sp(16'd0));

  logic [31:0] ref_piw = P0 + 32'd3000, cav_piw = P0 - 32'd2000;
  logic [31:0] ref_acc = '0, cav_acc = '0, dds_acc = '0;
  int div = 0;
  always @(posedge clk) begin
    ref_acc <= ref_acc + ref_piw;
    ext_ref <= ref_acc[31];
    cav_acc <= cav_acc + cav_piw;
    dds_acc <= dds_acc + piw;
    div <= (div + 1) % 64;
    pu_valid <= (div == 0);
    pu_ph <= 16'((cav_acc - dds_acc) >> 16);
    if (upd) n_upd++;
  end

  initial forever begin repeat (16384) @(posedge clk); if ($test$plusargs("trace")) $display("t piw=%0d err=%0d", int'(piw - P0), $signed(ph_err)); end
  task automatic settle_and_check(input logic [31:0] target, input int tol, input string what);
    longint sum = 0;
    repeat (400000) @(posedge clk);
    for (int n = 0; n < 65536; n++) begin
      @(posedge clk);
      sum += longint'(piw);
    end
    sum = sum / 65536;
    checks++;
    if (sum - longint'(target) > tol || longint'(target) - sum > tol) begin
      failures++;
      $display("%s: mean word %0d, target %0d", what, sum, target);
    end else
      $display("%s: locked, mean word offset %0d", what, sum - longint'(target));
  endtask

  initial begin
    g.kp = 16'd1024; g.ki = 16'd16;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (100) @(posedge clk);
    checks++;
    if (piw != P0) failures++;
    en <= 1'b1;
    settle_and_check(ref_piw, 40, "external reference");
    checks++;
    if (int'($signed(ph_err)) > 600 || int'($signed(ph_err)) < -600) begin
      failures++;
      $display("phase error %0d", $signed(ph_err));
    end
    use_pu <= 1'b1;
    g.kp <= 16'd3072; g.ki <= 16'd48;
    settle_and_check(cav_piw, 40, "pick-up phase");
    en <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (piw != P0) failures++;
    checks++;
    if (n_upd < 1000) failures++;
    $display("count PI updates %0d", n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
