// tb_fv_msb_decoder: self-checking testbench of the FV-MSB receiver.
//
// A reference encoder turns a synthetic word stream into (code, ctrl)
// pairs, which are fed straight to the decoder; the decoded value must equal
// the original word and the decoded case must equal the encoder's. On idle
// cycles (valid low) random garbage is driven, which must not disturb the
// decoder's codebooks. Every case (FV code, MSB code, raw word, raw one-hot
// word, raw word whose upper bits hit the MSB CAM) must occur.
module tb_fv_msb_decoder;
  import fv_msb_pkg::*;
  import fv_msb_ref_pkg::*;

  localparam int unsigned W = BUS_WIDTH;
  localparam int unsigned M = MSB_BITS;
  localparam int unsigned CYCLES = 30000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid;
  logic [W-1:0] code;
  logic ctrl;
  logic [W-1:0] value;
  enc_kind_e kind;

  int checks = 0;
  int failures = 0;
  int n_kind[3] = '{0, 0, 0};
  int n_raw_onehot = 0;

  fv_msb_decoder dut (.*);

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
      if (failures < 10) $display("FAIL %s at %0t: code=%h ctrl=%0d value=%h", what, $time, code, ctrl, value);
    end
  endtask

  initial begin
    fv_msb_ref model;
    stim_gen gen;
    logic [31:0] word, exp_code;
    bit exp_ctrl;
    int exp_kind;
    model = new(W, M);
    gen = new(W, M);
    valid = 1'b0; code = '0; ctrl = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < int'(CYCLES); c++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) begin
        valid = 1'b0;
        code = W'($urandom);
        ctrl = 1'($urandom);
      end else begin
        word = gen.next();
        model.encode(word, exp_code, exp_ctrl, exp_kind);
        valid = 1'b1;
        code = W'(exp_code);
        ctrl = exp_ctrl;
        #1;
        check(value == W'(word), "decoded value");
        check(int'(kind) == exp_kind, "decoded case");
        n_kind[exp_kind]++;
        if (exp_kind == KIND_RAW && $onehot(word)) n_raw_onehot++;
      end
    end
    $display("raw=%0d msb=%0d fv=%0d raw_onehot=%0d", n_kind[0], n_kind[1], n_kind[2], n_raw_onehot);
    check(n_kind[KIND_FV] > 0, "FV codes decoded");
    check(n_kind[KIND_MSB] > 0, "MSB codes decoded");
    check(n_kind[KIND_RAW] > 0, "raw words decoded");
    check(n_raw_onehot > 0, "raw one-hot words decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
