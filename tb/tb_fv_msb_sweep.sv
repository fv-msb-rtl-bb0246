// tb_fv_msb_sweep: runs one word stream through twelve FV-MSB links that
// differ only in the MSB CAM width M (8 to 30 in steps of 2; the MSB CAM has
// M entries of M bits) and reports, for each width, how many words were sent
// as MSB codes relative to FV codes and how many data-wire toggles were saved
// against the uncoded stream.
//
// Each link must return every word unchanged one cycle later with matching
// sender and receiver cases, and must send at least one FV and one MSB code.
// The printed table is the basis for choosing M; with the synthetic stream
// used here it is only indicative.
module tb_fv_msb_sweep;
  import fv_msb_pkg::*;
  import fv_msb_ref_pkg::*;

  localparam int unsigned W = BUS_WIDTH;
  localparam int unsigned NCFG = 12;
  localparam int unsigned CYCLES = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid;
  logic [W-1:0] in_data;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] bus_data[NCFG];
  logic [W-1:0] out_data[NCFG];
  logic         out_valid[NCFG];
  enc_kind_e    enc_kind[NCFG];
  enc_kind_e    dec_kind[NCFG];

  for (genvar g = 0; g < int'(NCFG); g++) begin : g_cfg
    logic bus_ctrl, bus_valid;
    fv_msb_link #(.W(W), .M(8 + 2 * g)) u_link (
      .clk, .rst_n, .in_valid, .in_data,
      .bus_data (bus_data[g]),
      .bus_ctrl, .bus_valid,
      .out_valid (out_valid[g]),
      .out_data  (out_data[g]),
      .enc_kind  (enc_kind[g]),
      .dec_kind  (dec_kind[g])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what, int cfg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (M=%0d) at %0t", what, 8 + 2 * cfg, $time);
    end
  endtask

  initial begin
    stim_gen gen;
    int n_fv[NCFG], n_msb[NCFG];
    longint tog[NCFG];
    longint plain;
    logic [W-1:0] last_plain, word;
    logic [W-1:0] bus_before[NCFG];
    enc_kind_e sent[NCFG];
    bit v;
    gen = new(W, 20);
    plain = 0;
    last_plain = '0;
    foreach (n_fv[i]) begin n_fv[i] = 0; n_msb[i] = 0; tog[i] = 0; end
    in_valid = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < int'(CYCLES); c++) begin
      @(negedge clk);
      word = W'(gen.next());
      v = ($urandom_range(0, 9) != 0);
      in_valid = v;
      in_data = word;
      #1;
      foreach (bus_before[i]) begin
        bus_before[i] = bus_data[i];
        sent[i] = enc_kind[i];
      end
      @(posedge clk); #1;
      if (v) begin
        plain += $countones(word ^ last_plain);
        last_plain = word;
        for (int i = 0; i < int'(NCFG); i++) begin
          check(out_valid[i], "one-cycle latency", i);
          check(out_data[i] == word, "round trip", i);
          check(dec_kind[i] == sent[i], "receiver case", i);
          tog[i] += $countones(bus_data[i] ^ bus_before[i]);
          if (sent[i] == ENC_FV) n_fv[i]++;
          if (sent[i] == ENC_MSB) n_msb[i]++;
        end
      end
    end
    $display("   M  MSB/FV codes  toggle saving");
    for (int i = 0; i < int'(NCFG); i++) begin
      $display("  %2d  %5d/%5d   %0d%%", 8 + 2 * i, n_msb[i], n_fv[i], 100 - (100 * tog[i]) / plain);
      check(n_fv[i] > 0 && n_msb[i] > 0, "FV and MSB codes occurred", i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
