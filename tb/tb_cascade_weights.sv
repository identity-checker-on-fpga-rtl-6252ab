// tb_cascade_weights: loads random stage and feature entries through the
// configuration port, reads all of them back through the synchronous read
// ports (data must appear one cycle after the address), and checks the
// stage count register, including its limit at MAX_STAGES and that writes
// beyond the table sizes are ignored.
module tb_cascade_weights;
  import fd_pkg::*;
  localparam int MS = 25, MF = 2913;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  cfg_sel_e cfg_sel = CFG_STAGE;
  logic [11:0] cfg_addr = 0, feat_addr = 0;
  logic [FEAT_BITS-1:0] cfg_wdata = 0;
  logic [4:0] stage_addr = 0;
  haar_stage_t stage_data;
  haar_feature_t feat_data;
  logic [7:0] num_stages;
  haar_stage_t   exp_s [MS];
  haar_feature_t exp_f [MF];
  int checks = 0, failures = 0;

  cascade_weights #(.MAX_STAGES(MS), .MAX_FEATURES(MF)) dut (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata,
    .stage_addr, .stage_data, .feat_addr, .feat_data, .num_stages);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(cfg_sel_e sel, int addr, logic [FEAT_BITS-1:0] d);
    @(negedge clk); cfg_we = 1; cfg_sel = sel; cfg_addr = 12'(addr); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    automatic int bad = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (num_stages != 0) begin failures++; $display("num_stages not 0 after reset"); end
    for (int i = 0; i < MS; i++) begin
      exp_s[i] = haar_stage_t'({$urandom, $urandom});
      cfg(CFG_STAGE, i, FEAT_BITS'(exp_s[i]));
    end
    for (int i = 0; i < MF; i++) begin
      exp_f[i] = haar_feature_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      cfg(CFG_FEATURE, i, exp_f[i]);
    end
    // out-of-range writes must not alias onto entry 0
    cfg(CFG_FEATURE, 4095, '1);
    cfg(CFG_STAGE, 31, '1);
    for (int i = 0; i < MS; i++) begin
      @(negedge clk); stage_addr = 5'(i);
      @(negedge clk);
      if (stage_data != exp_s[i]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d stage entries wrong", bad); end
    bad = 0;
    for (int i = 0; i < MF; i++) begin
      @(negedge clk); feat_addr = 12'(i);
      @(negedge clk);
      if (feat_data != exp_f[i]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d feature entries wrong", bad); end
    // one-cycle latency: change the address, data follows after one edge
    @(negedge clk); feat_addr = 12'd7;
    @(negedge clk); feat_addr = 12'd8;
    checks++;
    if (feat_data != exp_f[7]) begin failures++; $display("read latency wrong"); end
    cfg(CFG_NSTAGES, 0, FEAT_BITS'(3));
    checks++;
    if (num_stages != 3) begin failures++; $display("num_stages %0d", num_stages); end
    cfg(CFG_NSTAGES, 0, FEAT_BITS'(200));
    checks++;
    if (int'(num_stages) != MS) begin failures++; $display("num_stages not limited: %0d", num_stages); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
