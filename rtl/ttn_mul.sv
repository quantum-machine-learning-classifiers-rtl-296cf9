// ttn_mul: fixed-point multiplier standing for one DSP slice.
//
// Computes p = (a * b) >>> FRAC, i.e. the product of two Q(W-FRAC).FRAC
// numbers rescaled back to FRAC fractional bits (truncation towards minus
// infinity). The result is kept at PW = 2*W - FRAC bits, so it never
// overflows; saturation to W bits is left to the user.
//
// Timing: LAT register stages (LAT >= 1), all advanced by `en`. LAT plays the
// role of the tunable number of internal DSP registers (delta t_DSP); the
// surrounding logic only relies on the total latency, so a vendor DSP
// primitive with the same latency can replace this behavioural multiply.
module ttn_mul #(
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 14,
  parameter int unsigned LAT  = 3,
  localparam int unsigned PW  = 2 * W - FRAC
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic signed [W-1:0]  a,
  input  logic signed [W-1:0]  b,
  output logic signed [PW-1:0] p
);

  logic signed [2*W-1:0] full;
  logic signed [PW-1:0]  pipe [LAT];

  assign full = a * b;

  always_ff @(posedge clk) begin
    if (en) begin
      pipe[0] <= PW'(full >>> FRAC);
      for (int unsigned s = 1; s < LAT; s++) pipe[s] <= pipe[s-1];
    end
  end

  assign p = pipe[LAT-1];

endmodule
