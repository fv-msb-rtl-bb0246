// fv_msb_encoder: sending side of the FV-MSB bus code.
//
// Each transferred word is looked up in two CAMs at once: the FV CAM holds
// recent full words, the MSB CAM holds recent values of the upper M bits.
// The code word is chosen with the priority of the selection gates:
//   - FV hit: a one-hot code over the whole bus; entry i drives bit W-1-i,
//     so the first entry is the most significant wire.
//   - FV miss, MSB hit, low W-M bits not all zero: the upper M bits carry the
//     one-hot MSB CAM index (entry i on bit W-1-i), the low bits go as they are.
//   - anything else: the word itself.
// An MSB hit whose low bits are all zero is sent raw, because its code would
// be a pure one-hot word that the receiver would take for an FV code. With
// that rule a single control wire suffices: `ctrl` is 1 for an FV or MSB
// code and 0 for a raw word. The receiver tells FV from MSB codes by shape:
// an FV code has exactly one 1, an MSB code has at least two.
//
// Both CAMs are updated (LRU) with every word for which `valid` is high, hit
// or miss. Code and control are combinational from `value`; the CAM update
// happens at the clock edge. `kind`, `fv_hit` and `msb_hit` report what was
// done, for activity counting.
//
// The code forms, the priority and the single control signal follow the
// design description. The bit order of the one-hot codes (first entry on the
// top wire) follows its four-entry example "1000"; the valid qualifier and
// the reset are this implementation's choice.
module fv_msb_encoder
  import fv_msb_pkg::*;
#(
  parameter int unsigned W = BUS_WIDTH,
  parameter int unsigned M = MSB_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic [W-1:0] value,
  output logic [W-1:0] code,
  output logic         ctrl,
  output enc_kind_e    kind,
  output logic         fv_hit,
  output logic         msb_hit
);

  logic [W-1:0] fv_oh;
  logic [M-1:0] msb_oh;
  logic [W-1:0] fv_rd_unused;
  logic [M-1:0] msb_rd_unused;

  lru_cam #(.WIDTH(W), .ENTRIES(W)) u_fv_cam (
    .clk, .rst_n,
    .key     (value),
    .hit     (fv_hit),
    .hit_oh  (fv_oh),
    .rd_oh   ('0),
    .rd_data (fv_rd_unused),
    .upd     (valid)
  );

  lru_cam #(.WIDTH(M), .ENTRIES(M)) u_msb_cam (
    .clk, .rst_n,
    .key     (value[W-1 -: M]),
    .hit     (msb_hit),
    .hit_oh  (msb_oh),
    .rd_oh   ('0),
    .rd_data (msb_rd_unused),
    .upd     (valid)
  );

  // One-hot codes, first entry on the most significant wire.
  logic [W-1:0] fv_code;
  logic [M-1:0] msb_code;
  always_comb begin
    for (int unsigned i = 0; i < W; i++) fv_code[W-1-i]  = fv_oh[i];
    for (int unsigned i = 0; i < M; i++) msb_code[M-1-i] = msb_oh[i];
  end

  // The low bits decide whether an MSB code could be mistaken for an FV code.
  logic low_nonzero;
  assign low_nonzero = |value[W-M-1:0];

  logic use_fv, use_msb;
  assign use_fv  = fv_hit;
  assign use_msb = !fv_hit && msb_hit && low_nonzero;

  // AND-OR selection of the three candidate code words.
  assign code = ({W{use_fv}}              & fv_code)
              | ({W{use_msb}}             & {msb_code, value[W-M-1:0]})
              | ({W{!use_fv && !use_msb}} & value);
  assign ctrl = use_fv || use_msb;
  assign kind = use_fv ? ENC_FV : (use_msb ? ENC_MSB : ENC_RAW);

endmodule
