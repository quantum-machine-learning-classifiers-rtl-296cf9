// feature_map: local feature map phi(x) = [sin(pi x / 2), cos(pi x / 2)].
//
// Each raw feature x (Q(W-FRAC).FRAC, expected in [0, 1]; values outside are
// clamped) is mapped to the two-component vector fed to the leaves of the
// tree. The map is a look-up table of 2^ABITS + 1 sine samples over the
// quarter period, indexed by the ABITS most significant fractional bits of x;
// cos(pi x / 2) is read from the same table at the mirrored address
// 2^ABITS - addr. The table is computed at elaboration by an integer Taylor
// series (no file, no real arithmetic) and rounded to FRAC fractional bits.
//
// Timing: one register stage, advanced by `en`. The mapping and its use of
// LUTs follow the described firmware; the table size is this design's choice.
module feature_map #(
  parameter int unsigned W     = 16,
  parameter int unsigned FRAC  = 14,
  parameter int unsigned ABITS = 10
) (
  input  logic                clk,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] phi_sin,
  output logic signed [W-1:0] phi_cos
);

  localparam int unsigned NT = (1 << ABITS) + 1;

  // sin(pi/2 * a / 2^ABITS) in Q.FRAC, computed with 28-bit-fraction integers.
  function automatic logic signed [W-1:0] sin_entry(int unsigned a);
    longint th, th2, term, acc;
    th   = (longint'(421657428) * longint'(a)) >>> ABITS;  // (pi/2)*2^28 * a/2^ABITS
    th2  = (th * th) >>> 28;
    term = th;
    acc  = th;
    for (int n = 1; n <= 8; n++) begin
      term = -((term * th2) >>> 28) / longint'((2 * n) * (2 * n + 1));
      acc  = acc + term;
    end
    acc = (acc + (longint'(1) <<< (27 - FRAC))) >>> (28 - FRAC);
    return W'(acc);
  endfunction

  logic signed [W-1:0] table_q [NT];
  for (genvar a = 0; a < NT; a++) begin : g_table
    assign table_q[a] = sin_entry(a);
  end

  logic [ABITS:0] addr;
  always_comb begin
    if (x <= 0)
      addr = '0;
    else if (x >= (W'(1) <<< FRAC))
      addr = (ABITS + 1)'(1 << ABITS);
    else
      addr = (ABITS + 1)'(x >>> (FRAC - ABITS));
  end

  always_ff @(posedge clk) begin
    if (en) begin
      phi_sin <= table_q[addr];
      phi_cos <= table_q[(ABITS + 1)'(1 << ABITS) - addr];
    end
  end

endmodule
