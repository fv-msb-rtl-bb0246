// lru_cam: content-addressable codebook with least-recently-used replacement.
//
// Used twice on each side of the link: as the FV CAM (32 entries of 32 bits)
// and as the MSB CAM (20 entries of the upper 20 bits). Every entry has a
// valid bit, a data word and a timestamp (an age from 0 = most recently used
// to ENTRIES-1 = least recently used). The ages always form a permutation of
// 0..ENTRIES-1.
//
// Search is combinational: `hit` and the one-hot `hit_oh` follow `key` in the
// same cycle. When `upd` is high at a clock edge the codebook is updated for
// `key`: on a hit the matching entry becomes age 0 and every younger entry
// ages by one; on a miss the entry of age ENTRIES-1 is overwritten with `key`,
// made valid and age 0, and all others age by one. Because reset gives
// entry i the age i with every entry invalid, empty entries are always older
// than filled ones, so the codebook fills before it evicts.
//
// A second, independent read port returns the word of the entry selected by
// the one-hot `rd_oh`; the receiver uses it to turn a received index back
// into a value. `rd_oh` should be one-hot or zero (zero reads as 0; several
// bits read the OR of the selected words).
//
// LRU replacement on every lookup follows the design description; the age
// counters, valid bits and the reset state are this implementation's choice
// (the description only names "timestamps").
module lru_cam #(
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned ENTRIES = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WIDTH-1:0]   key,
  output logic               hit,
  output logic [ENTRIES-1:0] hit_oh,
  input  logic [ENTRIES-1:0] rd_oh,
  output logic [WIDTH-1:0]   rd_data,
  input  logic               upd
);

  localparam int unsigned AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam logic [AW-1:0] OLDEST = AW'(ENTRIES - 1);

  logic [WIDTH-1:0]   data_q [ENTRIES];
  logic [AW-1:0]      age_q  [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  // Match lines.
  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++)
      hit_oh[i] = valid_q[i] && (data_q[i] == key);
  end
  assign hit = |hit_oh;

  // Age of the matching entry (0 when nothing matches).
  logic [AW-1:0] hit_age;
  always_comb begin
    hit_age = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (hit_oh[i]) hit_age = hit_age | age_q[i];
  end

  // Read port: AND-OR of the selected word.
  always_comb begin
    rd_data = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (rd_oh[i]) rd_data = rd_data | data_q[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        age_q[i]  <= AW'(i);
        data_q[i] <= '0;
      end
      valid_q <= '0;
    end else if (upd) begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (hit) begin
          if (hit_oh[i])                age_q[i] <= '0;
          else if (age_q[i] < hit_age)  age_q[i] <= age_q[i] + 1'b1;
        end else begin
          if (age_q[i] == OLDEST) begin
            age_q[i]   <= '0;
            data_q[i]  <= key;
            valid_q[i] <= 1'b1;
          end else begin
            age_q[i] <= age_q[i] + 1'b1;
          end
        end
      end
    end
  end

  // A key never sits in two entries.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_oh));

endmodule
