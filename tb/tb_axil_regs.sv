// tb_axil_regs: AXI4-Lite master that writes every control register with
// random data (address and data phases offered in random order, byte
// strobes exercised, response back-pressure), reads each register back,
// checks the decoded configuration fields, and reads the status registers
// against driven values. Assertions hold the slave to the AXI rule that a
// raised VALID stays up until its READY.
module tb_axil_regs;
  import llrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic [7:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 1'b0, s_axi_wvalid = 1'b0, s_axi_bready = 1'b0;
  logic s_axi_arvalid = 1'b0, s_axi_rready = 1'b0;
  logic [31:0] s_axi_wdata = '0;
  logic [3:0] s_axi_wstrb = '0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  llrf_cfg_t cfg;
  llrf_sts_t sts;
  int checks = 0, failures = 0;
  axil_regs #(.ADDR_W(8)) dut (.*);

  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

  task automatic axi_write(input logic [7:0] a, input logic [31:0] d, input logic [3:0] strb);
    automatic int order = $urandom_range(2, 0);
    s_axi_awaddr <= a; s_axi_wdata <= d; s_axi_wstrb <= strb;
    if (order != 2) s_axi_awvalid <= 1'b1;
    if (order != 1) s_axi_wvalid <= 1'b1;
    if (order != 0) begin
      repeat ($urandom_range(3, 1)) @(posedge clk);
      s_axi_awvalid <= 1'b1; s_axi_wvalid <= 1'b1;
    end
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    s_axi_awvalid <= 1'b0; s_axi_wvalid <= 1'b0;
    repeat ($urandom_range(3, 0)) @(posedge clk);   // response back-pressure
    s_axi_bready <= 1'b1;
    do @(posedge clk); while (!s_axi_bvalid);
    s_axi_bready <= 1'b0;
    checks++;
    if (s_axi_bresp != 2'b00) failures++;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    s_axi_araddr <= a; s_axi_arvalid <= 1'b1;
    do @(posedge clk); while (!s_axi_arready);
    s_axi_arvalid <= 1'b0;
    repeat ($urandom_range(3, 0)) @(posedge clk);
    s_axi_rready <= 1'b1;
    do @(posedge clk); while (!s_axi_rvalid);
    d = s_axi_rdata;
    s_axi_rready <= 1'b0;
  endtask

  logic [31:0] shadow [26];
  logic [31:0] rd;

  initial begin
    sts = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // reset values the controller starts from
    axi_read(8'h04, rd); checks++; if (rd != 32'd416611827) failures++;
    axi_read(8'h4C, rd); checks++; if (rd != 32'd8191) failures++;
    axi_read(8'h60, rd); checks++; if (rd != 32'd32767) failures++;
    for (int k = 0; k < 26; k++) begin
      shadow[k] = $urandom;
      axi_write(8'(4 * k), shadow[k], 4'hF);
    end
    // byte strobes: change only byte 1 of PIW_BASE
    axi_write(8'h04, 32'hA5A5_A5A5, 4'b0010);
    shadow[1][15:8] = 8'hA5;
    for (int k = 0; k < 26; k++) begin
      axi_read(8'(4 * k), rd);
      checks++;
      if (rd != shadow[k]) begin
        failures++;
        $display("reg %0d read %h exp %h", k, rd, shadow[k]);
      end
    end
    @(negedge clk);
    checks++;
    if (cfg.mode != mode_e'(shadow[0][1:0]) || cfg.dpll_en != shadow[0][3] || cfg.tuner_en != shadow[0][4] ||
        cfg.piw_base != shadow[1] || cfg.ch[1].i_sp != 18'(shadow[5]) || cfg.ch[2].q_sp != 18'(shadow[9]) ||
        cfg.ch[0].g.kp != shadow[4][15:0] || cfg.ch[0].g.ki != shadow[4][31:16] ||
        cfg.g_dpll != shadow[13] || cfg.ph_shift != shadow[16][15:0] || cfg.dac_lim != 14'(shadow[19]) ||
        cfg.tuner_duty != shadow[22][7:0] || cfg.ch[2].rot_cos != shadow[25][15:0] ||
        cfg.ch[1].rot_sin != shadow[24][31:16]) begin
      failures++;
      $display("cfg field mismatch");
    end
    // status registers
    sts.amp0 = 19'h5_1234; sts.ph0 = 16'hBEEF; sts.piw = 32'hCAFE_F00D;
    sts.i0 = -18'sd5; sts.q0 = 18'sd77; sts.clip = 1'b1; sts.tuner_ccw = 1'b1;
    axi_read(8'h80, rd); checks++; if (rd != 32'h5_1234) failures++;
    axi_read(8'h84, rd); checks++; if (rd != 32'hBEEF) failures++;
    axi_read(8'h88, rd); checks++; if (rd != 32'(-18'sd5)) failures++;
    axi_read(8'h90, rd); checks++; if (rd != 32'hCAFE_F00D) failures++;
    axi_read(8'h9C, rd); checks++; if (rd != 32'd5) failures++;
    axi_read(8'hF0, rd); checks++; if (rd != 32'd0) failures++;
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
