// tb_fv_msb_encoder: self-checking testbench of the FV-MSB sender.
//
// Drives a synthetic data-bus word stream (recurring values, small integers,
// pointers sharing upper bits, region bases with zero low bits, one-hot and
// random words), with `valid` low about one cycle in ten, and compares code,
// control bit and case with a reference encoder built on recency-list LRU
// models. Counts every case: FV code, MSB code, MSB hit sent raw because the
// low bits are zero, FV hit that also hits the MSB CAM (FV must win), and
// raw words that look one-hot; each must occur.
module tb_fv_msb_encoder;
  import fv_msb_pkg::*;
  import fv_msb_ref_pkg::*;

  localparam int unsigned W = BUS_WIDTH;
  localparam int unsigned M = MSB_BITS;
  localparam int unsigned CYCLES = 30000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid;
  logic [W-1:0] value;
  logic [W-1:0] code;
  logic ctrl;
  enc_kind_e kind;
  logic fv_hit, msb_hit;

  int checks = 0;
  int failures = 0;
  int n_fv = 0, n_msb = 0, n_raw = 0, n_msb_zero_low = 0, n_both = 0, n_raw_onehot = 0;

  fv_msb_encoder dut (.*);

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
      if (failures < 10) $display("FAIL %s at %0t: value=%h code=%h", what, $time, value, code);
    end
  endtask

  initial begin
    fv_msb_ref model;
    stim_gen gen;
    logic [31:0] exp_code;
    bit exp_ctrl;
    int exp_kind;
    model = new(W, M);
    gen = new(W, M);
    valid = 1'b0; value = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < int'(CYCLES); c++) begin
      @(negedge clk);
      value = W'(gen.next());
      valid = ($urandom_range(0, 9) != 0);
      #1;
      model.encode(32'(value), exp_code, exp_ctrl, exp_kind, valid);
      check(code == W'(exp_code), "code");
      check(ctrl == exp_ctrl, "ctrl");
      check(int'(kind) == exp_kind, "kind");
      check(ctrl == (kind != ENC_RAW), "ctrl matches kind");
      if (valid) begin
        case (exp_kind)
          KIND_FV:  n_fv++;
          KIND_MSB: n_msb++;
          default:  n_raw++;
        endcase
        if (exp_kind == KIND_RAW && msb_hit) n_msb_zero_low++;
        if (exp_kind == KIND_FV && msb_hit) n_both++;
        if (exp_kind == KIND_RAW && $onehot(value)) n_raw_onehot++;
      end
    end
    $display("fv=%0d msb=%0d raw=%0d msb_hit_zero_low=%0d fv_and_msb=%0d raw_onehot=%0d fv_evictions=%0d msb_evictions=%0d",
             n_fv, n_msb, n_raw, n_msb_zero_low, n_both, n_raw_onehot, model.fv.evictions, model.msb.evictions);
    check(n_fv > 0, "FV codes sent");
    check(n_msb > 0, "MSB codes sent");
    check(n_raw > 0, "raw words sent");
    check(n_msb_zero_low > 0, "MSB hit with zero low bits sent raw");
    check(n_both > 0, "FV priority over MSB");
    check(n_raw_onehot > 0, "raw one-hot word");
    check(model.fv.evictions > 0 && model.msb.evictions > 0, "evictions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
