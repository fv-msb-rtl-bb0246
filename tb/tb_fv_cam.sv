// tb_fv_cam: self-checking testbench of lru_cam in its FV CAM configuration (32 entries of 32 bits).
//
// Each cycle a key is drawn from a pool a little larger than the codebook
// (so there are hits, misses and evictions), an update is requested most of
// the time, and a random entry is read through the read port. Hit flag, hit
// index and read data are compared with an LRU model that keeps a recency
// list rather than age counters. Checks the fill order from reset, hits
// refreshing an entry, and eviction of the least recently used entry.
module tb_fv_cam;
  import fv_msb_ref_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned N = 32;
  localparam int unsigned CYCLES = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [W-1:0] key;
  logic hit;
  logic [N-1:0] hit_oh;
  logic [N-1:0] rd_oh;
  logic [W-1:0] rd_data;
  logic upd;

  int checks = 0;
  int failures = 0;
  int hits_seen = 0;

  lru_cam #(.WIDTH(W), .ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES * 2 + 1000) @(posedge clk);
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
    lru_ref model;
    logic [W-1:0] pool[];
    int h, e;
    model = new(N, W);
    pool = new[N + N / 2];
    foreach (pool[i]) pool[i] = W'($urandom) ^ W'(i);
    // Pool values must be distinct for a clean hit pattern.
    foreach (pool[i]) pool[i] = {pool[i][W-1:8], 8'(i)};
    key = '0; rd_oh = '0; upd = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // After reset nothing hits.
    key = pool[0];
    @(negedge clk);
    check(!hit && hit_oh == '0, "hit after reset");

    // The first N distinct keys fill the entries from the last one down.
    for (int i = 0; i < int'(N); i++) begin
      key = pool[i]; upd = 1'b1;
      @(posedge clk); #1;
      e = model.update(32'(pool[i]));
      check(e == int'(N) - 1 - i, "model fill order");
      upd = 1'b0;
      rd_oh = N'(1) << e;
      #1;
      check(rd_data == pool[i], "fill order read back");
      @(negedge clk);
    end

    // Random traffic.
    for (int c = 0; c < int'(CYCLES); c++) begin
      @(negedge clk);
      key = ($urandom_range(0, 9) == 0) ? W'($urandom) : pool[$urandom_range(0, pool.size() - 1)];
      upd = ($urandom_range(0, 3) != 0);
      e = $urandom_range(0, N - 1);
      rd_oh = N'(1) << e;
      #1;
      h = model.find(32'(key));
      check(hit == (h >= 0), "hit flag");
      check(hit_oh == ((h >= 0) ? (N'(1) << h) : '0), "hit index");
      check(rd_data == W'(model.valid[e] ? model.data[e] : 0), "read data");
      if (h >= 0) hits_seen++;
      @(posedge clk);
      if (upd) void'(model.update(32'(key)));
    end

    check(hits_seen > int'(CYCLES) / 4, "enough hits exercised");
    check(model.evictions > 100, "evictions exercised");
    $display("hits=%0d evictions=%0d", hits_seen, model.evictions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
