// Self-checking testbench for the configuration network.
// Random words on the 16 GLB lanes must appear on the addressed column's
// upper bus one cycle later and on its lower bus two cycles later, and on no
// other column. Host words are accepted only when the owning lane is idle.
module tb_amber_cfg_net;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, host_acc = 0, host_ref = 0;
  cfg_word_t [15:0] lane;
  logic [15:0] lane_v;
  logic host_v, host_ready;
  logic [31:0] host_word;
  cfg_bus_t [31:0] cfg_top, cfg_bot, exp1, exp2;

  amber_cfg_net dut (.clk, .rst_n, .lane, .lane_v, .host_v, .host_word, .host_ready, .cfg_top, .cfg_bot);

  initial begin
    lane = '0; lane_v = '0; host_v = 0; host_word = 0; exp1 = '0; exp2 = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (300) begin
      cfg_bus_t [31:0] e;
      int hc;
      e = '0;
      for (int t = 0; t < 16; t++) begin
        lane[t] = cfg_word_t'($urandom);
        lane_v[t] = 1'($urandom);
        if (lane_v[t]) e[2*t + lane[t].col] = '{we: 1'b1, row: lane[t].row, reg_a: lane[t].reg_a, data: lane[t].data};
      end
      host_v = 1; host_word = $urandom; hc = int'(host_word[31:27]);
      #1;
      checks++;
      if (host_ready != !lane_v[hc / 2]) begin failures++; $display("FAIL: host_ready"); end
      if (host_ready) begin
        host_acc++;
        e[hc] = '{we: 1'b1, row: host_word[26:23], reg_a: host_word[22:16], data: host_word[15:0]};
      end else host_ref++;
      @(posedge clk); #1;
      exp2 = exp1; exp1 = e;
      checks += 2;
      if (cfg_top !== exp1) begin failures++; $display("FAIL: upper bus"); end
      if (cfg_bot !== exp2) begin failures++; $display("FAIL: lower bus"); end
      @(negedge clk);
    end
    checks++;
    if (host_acc == 0 || host_ref == 0) begin failures++; $display("FAIL: host arbitration not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
