// Self-checking testbench for the switch box: for random configurations,
// every outgoing wire must carry the selected incoming track or core output,
// and wires with their register enabled must show it one cycle later.
module tb_amber_sb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0][4:0][15:0] in, out, expv, expq;
  logic [1:0][15:0] core;
  logic [3:0][4:0][3:0] cfg;
  amber_sb #(.W(16), .NT(5)) dut (.clk, .rst_n, .in, .core, .cfg, .out);

  function automatic logic [3:0][4:0][15:0] model();
    logic [3:0][4:0][15:0] m;
    for (int s = 0; s < 4; s++) for (int t = 0; t < 5; t++)
      case (cfg[s][t][2:0])
        1: m[s][t] = in[(s+1)%4][t];
        2: m[s][t] = in[(s+2)%4][t];
        3: m[s][t] = in[(s+3)%4][t];
        4: m[s][t] = core[0];
        5: m[s][t] = core[1];
        default: m[s][t] = 0;
      endcase
    return m;
  endfunction

  initial begin
    in = '0; core = '0; cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (200) begin
      for (int s = 0; s < 4; s++) for (int t = 0; t < 5; t++) cfg[s][t] = {1'($urandom), 3'($urandom_range(0, 6))};
      for (int s = 0; s < 4; s++) for (int t = 0; t < 5; t++) in[s][t] = 16'($urandom);
      core = {16'($urandom), 16'($urandom)};
      expq = model();
      @(negedge clk);
      // new inputs: combinational wires follow, registered wires keep last cycle's value
      for (int s = 0; s < 4; s++) for (int t = 0; t < 5; t++) in[s][t] = 16'($urandom);
      core = {16'($urandom), 16'($urandom)};
      #1;
      expv = model();
      for (int s = 0; s < 4; s++) for (int t = 0; t < 5; t++) begin
        checks++;
        if (out[s][t] !== (cfg[s][t][3] ? expq[s][t] : expv[s][t])) begin
          failures++; $display("FAIL: side %0d track %0d", s, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
