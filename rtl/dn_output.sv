// dn_output: duty-command accumulator of the incremental PID.
//
// Holds u(k) with FRAC fractional bits and on every rising edge of the
// sample clock clk1 adds the signed increment delta_d:
//   u(k) = u(k-1) + delta_d,  clamped to [0, 2^(DPWM_BITS+FRAC) - 1].
// The duty command is the integer part, dn = u >> FRAC, i.e. the gains'
// 2^FRAC scale is removed here. Clamping the accumulator (rather than only
// the output) keeps it from winding up beyond the DPWM range; sat reports a
// sample on which the limit was applied. The limits are this design's
// choice: the full DPWM range.
//
// Timing: dn and sat are registered, one clk1 edge after delta_d is
// presented. Reset (asynchronous, active low) sets u to zero, as the PID
// initialisation requires.
module dn_output #(
  parameter int DPWM_BITS = 10,
  parameter int FRAC      = 8,
  parameter int DW        = 29   // width of delta_d (signed)
) (
  input  logic                 clk1,
  input  logic                 n_rst,
  input  logic signed [DW-1:0] delta_d,
  output logic [DPWM_BITS-1:0] dn,
  output logic                 sat
);

  localparam int UW = DPWM_BITS + FRAC;
  localparam int SW = (DW > UW ? DW : UW) + 2;

  logic [UW-1:0]        u;
  logic signed [SW-1:0] sum;
  logic [UW-1:0]        u_next;
  logic                 limit;

  always_comb begin
    sum = $signed({{(SW-UW){1'b0}}, u}) + SW'(delta_d);
    if (sum < 0) begin
      u_next = '0;
      limit  = 1'b1;
    end else if (sum > $signed({{(SW-UW){1'b0}}, {UW{1'b1}}})) begin
      u_next = '1;
      limit  = 1'b1;
    end else begin
      u_next = sum[UW-1:0];
      limit  = 1'b0;
    end
  end

  always_ff @(posedge clk1 or negedge n_rst) begin
    if (!n_rst) begin
      u   <= '0;
      sat <= 1'b0;
    end else begin
      u   <= u_next;
      sat <= limit;
    end
  end

  assign dn = u[UW-1:FRAC];

endmodule
