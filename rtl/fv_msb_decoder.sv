// fv_msb_decoder: receiving side of the FV-MSB bus code.
//
// Keeps its own FV CAM and MSB CAM, which stay identical to the sender's
// because both sides apply the same LRU update to the same sequence of words.
// A received word (after decorrelation) is classified as follows:
//   - ctrl = 0: a raw word; it is the value.
//   - ctrl = 1 and exactly one bit set: an FV code; bit W-1-i selects FV CAM
//     entry i, whose word is the value.
//   - ctrl = 1 otherwise: an MSB code; the upper M bits select MSB CAM entry
//     (bit W-1-i for entry i), which supplies the upper M bits of the value,
//     and the low W-M bits are copied.
// The rebuilt value is then used as the search key of both local CAMs and,
// when `valid` is high, they are updated at the clock edge exactly as the
// sender's were. `value` and `kind` are combinational from `code`/`ctrl`.
//
// The classification is the one the design description sets out for its
// single control signal; the shape test (one set bit = FV code) is how this
// implementation tells its cases a) and b) apart.
module fv_msb_decoder
  import fv_msb_pkg::*;
#(
  parameter int unsigned W = BUS_WIDTH,
  parameter int unsigned M = MSB_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic [W-1:0] code,
  input  logic         ctrl,
  output logic [W-1:0] value,
  output enc_kind_e    kind
);

  logic         is_fv, is_msb;
  logic [W-1:0] fv_sel;
  logic [M-1:0] msb_sel;
  logic [W-1:0] fv_word;
  logic [M-1:0] msb_word;

  // Exactly one bit set: nonzero, and clearing the lowest set bit leaves 0.
  logic single_one;
  assign single_one = (code != '0) && ((code & (code - W'(1))) == '0);
  assign is_fv  = ctrl && single_one;
  assign is_msb = ctrl && !single_one;

  // Undo the bit order of the one-hot codes; select only in the matching case.
  always_comb begin
    for (int unsigned i = 0; i < W; i++) fv_sel[i]  = is_fv  && code[W-1-i];
    for (int unsigned i = 0; i < M; i++) msb_sel[i] = is_msb && code[W-1-i];
  end

  always_comb begin
    if (is_fv)       value = fv_word;
    else if (is_msb) value = {msb_word, code[W-M-1:0]};
    else             value = code;
  end
  assign kind = is_fv ? ENC_FV : (is_msb ? ENC_MSB : ENC_RAW);

  logic         fv_hit_unused, msb_hit_unused;
  logic [W-1:0] fv_oh_unused;
  logic [M-1:0] msb_oh_unused;

  lru_cam #(.WIDTH(W), .ENTRIES(W)) u_fv_cam (
    .clk, .rst_n,
    .key     (value),
    .hit     (fv_hit_unused),
    .hit_oh  (fv_oh_unused),
    .rd_oh   (fv_sel),
    .rd_data (fv_word),
    .upd     (valid)
  );

  lru_cam #(.WIDTH(M), .ENTRIES(M)) u_msb_cam (
    .clk, .rst_n,
    .key     (value[W-1 -: M]),
    .hit     (msb_hit_unused),
    .hit_oh  (msb_oh_unused),
    .rd_oh   (msb_sel),
    .rd_data (msb_word),
    .upd     (valid)
  );

  // Bus rule: a transferred word marked as coded is either a pure one-hot FV
  // code or has a one-hot MSB index in its upper M bits.
  assert property (@(posedge clk) disable iff (!rst_n)
                   valid && is_msb |-> $onehot(code[W-1 -: M]));

endmodule
