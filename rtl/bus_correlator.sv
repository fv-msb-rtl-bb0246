// bus_correlator: transition coding register that drives the bus.
//
// The bus carries Send_n = Send_(n-1) XOR Code_n, so a wire toggles exactly
// where the code word has a 1: a one-hot code costs one transition, whatever
// the previous bus state. `send` is the register output and changes only on
// a clock edge with `valid` high; it resets to all zeros. The control wire
// and a transfer strobe are registered next to it without XOR coding, so
// all three leave the sending side together, one cycle after the code.
//
// The XOR-and-register structure follows the design description; carrying
// the control wire uncoded, the strobe and the reset value are this
// implementation's choice.
module bus_correlator #(
  parameter int unsigned W = fv_msb_pkg::BUS_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic [W-1:0] code,
  input  logic         ctrl,
  output logic [W-1:0] send,
  output logic         send_ctrl,
  output logic         send_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      send       <= '0;
      send_ctrl  <= 1'b0;
      send_valid <= 1'b0;
    end else begin
      send_valid <= valid;
      if (valid) begin
        send      <= send ^ code;
        send_ctrl <= ctrl;
      end
    end
  end

endmodule
