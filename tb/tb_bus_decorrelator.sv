// tb_bus_decorrelator: self-checking testbench of the receiving XOR stage.
// Builds a bus word sequence from random codes (Send_n = Send_(n-1) XOR
// Code_n) in the testbench and checks that the decorrelator returns each
// code, with idle cycles (valid low, bus changing) not disturbing it.
module tb_bus_decorrelator;
  localparam int unsigned W = 32;
  localparam int unsigned CYCLES = 5000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid;
  logic [W-1:0] send;
  logic [W-1:0] dcode;

  int checks = 0;
  int failures = 0;

  bus_decorrelator dut (.*);

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
    logic [W-1:0] last, c;
    valid = 1'b0; send = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    last = '0;
    for (int n = 0; n < int'(CYCLES); n++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        valid = 1'b0;
        send = W'($urandom);
      end else begin
        c = W'($urandom) >> $urandom_range(0, W - 1);
        valid = 1'b1;
        send = last ^ c;
        last = send;
        #1;
        check(dcode == c, "decoded code");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
