// bus_decorrelator: inverse of bus_correlator on the receiving side.
//
// Keeps the previous bus word Send_(n-1) in a register and returns
// DCode_n = Send_n XOR Send_(n-1), which equals the sender's Code_n.
// `dcode` is combinational from `send`; the register takes `send` at each
// clock edge with `valid` high and resets to all zeros, matching the
// sender's reset.
//
// The structure follows the design description; the reset value and the
// valid qualifier are this implementation's choice.
module bus_decorrelator #(
  parameter int unsigned W = fv_msb_pkg::BUS_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic [W-1:0] send,
  output logic [W-1:0] dcode
);

  logic [W-1:0] prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n)     prev_q <= '0;
    else if (valid) prev_q <= send;
  end

  assign dcode = send ^ prev_q;

endmodule
