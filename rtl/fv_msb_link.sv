// fv_msb_link: complete FV-MSB coded bus link, sender and receiver.
//
// Words presented on `in_data` with `in_valid` are encoded (fv_msb_encoder),
// transition coded (bus_correlator) and driven onto the bus ports `bus_data`,
// `bus_ctrl`, `bus_valid`, which stand for the off-chip wires. The receiving
// half, fed from those same bus signals, decorrelates (bus_decorrelator) and
// decodes (fv_msb_decoder) them back into `out_data` with `out_valid`.
//
// Timing: a word accepted at clock edge n appears on the bus after that edge
// and on `out_data`/`out_valid` in the same cycle, so the end-to-end latency
// is one cycle and one word can be sent every cycle. The receiver's CAMs and
// decorrelation register update at the following edge. `enc_kind` and
// `dec_kind` tell how each word was coded, for activity counting.
//
// The chain follows the design description (codec, XOR correlator, bus,
// XOR decorrelator, codec); the one-cycle register stage is this
// implementation's choice.
module fv_msb_link
  import fv_msb_pkg::*;
#(
  parameter int unsigned W = BUS_WIDTH,
  parameter int unsigned M = MSB_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic [W-1:0] bus_data,
  output logic         bus_ctrl,
  output logic         bus_valid,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output enc_kind_e    enc_kind,
  output enc_kind_e    dec_kind
);

  logic [W-1:0] code, dcode;
  logic         ctrl;
  logic         fv_hit_unused, msb_hit_unused;

  fv_msb_encoder #(.W(W), .M(M)) u_enc (
    .clk, .rst_n,
    .valid   (in_valid),
    .value   (in_data),
    .code    (code),
    .ctrl    (ctrl),
    .kind    (enc_kind),
    .fv_hit  (fv_hit_unused),
    .msb_hit (msb_hit_unused)
  );

  bus_correlator #(.W(W)) u_corr (
    .clk, .rst_n,
    .valid      (in_valid),
    .code       (code),
    .ctrl       (ctrl),
    .send       (bus_data),
    .send_ctrl  (bus_ctrl),
    .send_valid (bus_valid)
  );

  bus_decorrelator #(.W(W)) u_decorr (
    .clk, .rst_n,
    .valid (bus_valid),
    .send  (bus_data),
    .dcode (dcode)
  );

  fv_msb_decoder #(.W(W), .M(M)) u_dec (
    .clk, .rst_n,
    .valid (bus_valid),
    .code  (dcode),
    .ctrl  (bus_ctrl),
    .value (out_data),
    .kind  (dec_kind)
  );

  assign out_valid = bus_valid;

endmodule
