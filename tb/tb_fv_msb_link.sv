// tb_fv_msb_link: end-to-end testbench of the FV-MSB coded bus link at its
// default size (32-wire bus, 32-entry FV CAM, 20-bit 20-entry MSB CAM).
//
// Phase 1 sends two short traces: pointer-chasing data (list pointers that
// share their upper 20 bits, interleaved with small values) and a loop over
// small integers. The second and later pointers must go as MSB codes, and a
// repeated small value as an FV code.
// Phase 2 sends a long synthetic stream with idle cycles, compared with a
// reference encoder. Every word must come out of the receiver unchanged one
// cycle after it was sent, with the same case on both sides; each FV code
// must toggle exactly one data wire and each MSB code one upper wire plus
// the low-bit changes. Each mechanism (FV code, MSB code, MSB hit sent raw,
// raw one-hot word, FV and MSB evictions, idle cycle) is counted and must
// occur. Bus toggles are compared with those of the same stream sent
// uncoded and the saving is printed.
module tb_fv_msb_link;
  import fv_msb_pkg::*;
  import fv_msb_ref_pkg::*;

  localparam int unsigned W = BUS_WIDTH;
  localparam int unsigned M = MSB_BITS;
  localparam int unsigned CYCLES = 50000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid;
  logic [W-1:0] in_data;
  logic [W-1:0] bus_data;
  logic bus_ctrl, bus_valid;
  logic out_valid;
  logic [W-1:0] out_data;
  enc_kind_e enc_kind, dec_kind;

  int checks = 0;
  int failures = 0;
  int n_kind[3] = '{0, 0, 0};
  int n_msb_zero_low = 0, n_raw_onehot = 0, n_idle = 0;
  longint coded_toggles = 0, plain_toggles = 0;

  fv_msb_link dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: in=%h out=%h bus=%h", what, $time, in_data, out_data, bus_data);
    end
  endtask

  fv_msb_ref model;
  logic [W-1:0] last_plain;

  // Send one word (or an idle cycle) and check it at the receiver.
  task automatic send(bit v, logic [W-1:0] word, output int kind);
    logic [31:0] exp_code;
    bit exp_ctrl;
    logic [W-1:0] bus_before;
    @(negedge clk);
    in_valid = v;
    in_data = word;
    bus_before = bus_data;
    kind = -1;
    if (v) begin
      model.encode(32'(word), exp_code, exp_ctrl, kind);
      #1;
      check(int'(enc_kind) == kind, "sender case");
    end
    @(posedge clk); #1;
    check(out_valid == v && bus_valid == v, "one-cycle latency");
    if (v) begin
      check(out_data == word, "round trip");
      check(int'(dec_kind) == kind, "receiver case");
      check(bus_ctrl == exp_ctrl, "control wire");
      check((bus_data ^ bus_before) == W'(exp_code), "bus toggles equal code");
      if (kind == KIND_FV) check($countones(bus_data ^ bus_before) == 1, "FV code toggles one wire");
      coded_toggles += $countones(bus_data ^ bus_before);
      plain_toggles += $countones(word ^ last_plain);
      last_plain = word;
      n_kind[kind]++;
    end else begin
      check(bus_data == bus_before, "idle bus holds");
      n_idle++;
    end
  endtask

  localparam logic [31:0] LIST_TRACE[9] = '{
    32'h10005098, 32'h0000001a, 32'h00000012, 32'h100050d8, 32'h00000000,
    32'h00000036, 32'h100050f8, 32'h0000001a, 32'h00000012};
  localparam logic [31:0] LOOP_TRACE[9] = '{
    32'h00000048, 32'h00000006, 32'h00000042, 32'h8048c0f6, 32'h00000047,
    32'h00000002, 32'h00000006, 32'h00000046, 32'h00000006};

  initial begin
    stim_gen gen;
    int k;
    bit msb_before, raw_like;
    model = new(W, M);
    gen = new(W, M);
    last_plain = '0;
    in_valid = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Phase 1: the two traces.
    foreach (LIST_TRACE[i]) begin
      send(1'b1, LIST_TRACE[i], k);
      if (i == 0) check(k == KIND_RAW, "first pointer sent raw");
      if (i == 3 || i == 6) check(k == KIND_MSB, "later pointer sent as MSB code");
      if (i == 7 || i == 8) check(k == KIND_FV, "repeated list value sent as FV code");
    end
    foreach (LOOP_TRACE[i]) begin
      send(1'b1, LOOP_TRACE[i], k);
      if (i == 6 || i == 8) check(k == KIND_FV, "repeated loop value sent as FV code");
    end
    send(1'b0, '0, k);

    // Phase 2: long synthetic stream.
    for (int c = 0; c < int'(CYCLES); c++) begin
      logic [W-1:0] word;
      word = W'(gen.next());
      if ($urandom_range(0, 19) == 0) begin
        send(1'b0, word, k);
      end else begin
        msb_before = model.msb.find(32'(word) >> (W - M)) >= 0;
        raw_like = model.fv.find(32'(word)) < 0;
        send(1'b1, word, k);
        if (k == KIND_RAW && msb_before) n_msb_zero_low++;
        if (k == KIND_RAW && $onehot(word)) n_raw_onehot++;
        if (k == KIND_FV) check(!raw_like, "FV code only on FV hit");
      end
    end

    $display("fv=%0d msb=%0d raw=%0d msb_hit_zero_low=%0d raw_onehot=%0d idle=%0d fv_evictions=%0d msb_evictions=%0d",
             n_kind[KIND_FV], n_kind[KIND_MSB], n_kind[KIND_RAW], n_msb_zero_low, n_raw_onehot, n_idle,
             model.fv.evictions, model.msb.evictions);
    $display("data-wire toggles: coded=%0d uncoded=%0d saving=%0d%%",
             coded_toggles, plain_toggles, 100 - (100 * coded_toggles) / plain_toggles);
    check(n_kind[KIND_FV] > 0, "FV codes occurred");
    check(n_kind[KIND_MSB] > 0, "MSB codes occurred");
    check(n_kind[KIND_RAW] > 0, "raw words occurred");
    check(n_msb_zero_low > 0, "MSB hit with zero low bits occurred");
    check(n_raw_onehot > 0, "raw one-hot word occurred");
    check(n_idle > 0, "idle cycles occurred");
    check(model.fv.evictions > 0, "FV evictions occurred");
    check(model.msb.evictions > 0, "MSB evictions occurred");
    check(coded_toggles < plain_toggles, "coding saves toggles on this stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
