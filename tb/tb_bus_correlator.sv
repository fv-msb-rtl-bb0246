// tb_bus_correlator: self-checking testbench of the transition-coding
// register. Checks that after each valid edge the bus equals the previous
// bus XOR the code (so the number of toggling wires equals the number of 1s
// in the code), that control and strobe are registered alongside, that idle
// cycles hold the bus, and that reset clears it.
module tb_bus_correlator;
  localparam int unsigned W = 32;
  localparam int unsigned CYCLES = 5000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid;
  logic [W-1:0] code;
  logic ctrl;
  logic [W-1:0] send;
  logic send_ctrl, send_valid;

  int checks = 0;
  int failures = 0;

  bus_correlator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [W-1:0] exp_send, prev_bus;
    bit exp_ctrl;
    valid = 1'b0; code = '0; ctrl = 1'b0;
    repeat (3) @(negedge clk);
    check(send == '0 && !send_ctrl && !send_valid, "reset state");
    rst_n = 1'b1;
    exp_send = '0; exp_ctrl = 1'b0;
    for (int c = 0; c < int'(CYCLES); c++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 4) != 0);
      code = ($urandom_range(0, 1) != 0) ? (W'(1) << $urandom_range(0, W - 1)) : W'($urandom);
      ctrl = 1'($urandom);
      prev_bus = send;
      @(posedge clk); #1;
      if (valid) begin
        exp_send = exp_send ^ code;
        exp_ctrl = ctrl;
      end
      check(send == exp_send, "bus word");
      check(send_ctrl == exp_ctrl, "control wire");
      check(send_valid == valid, "strobe");
      check($countones(send ^ prev_bus) == (valid ? $countones(code) : 0), "toggle count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
