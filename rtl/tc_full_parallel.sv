// tc_full_parallel: one tree-tensor-network node, fully parallel.
//
// Contracts the node tensor V (DOUT x DIN x DIN) with its two child vectors:
//   z[i] = sum_j sum_k V[i][j][k] * x[j] * y[k]
// in three pipelined stages, as in the full-parallel scheme:
//   1. DIN^2 multipliers form the cartesian product x[j]*y[k]
//      (rescaled to FRAC bits and saturated to W bits);
//   2. DOUT*DIN^2 multipliers multiply every product by its weights;
//   3. DOUT adder trees of DIN^2 inputs sum the weighted products; the sum is
//      saturated to W bits in a final output register.
// Multipliers: DIN^2 * (DOUT + 1), which is the described DSP count per node.
//
// Timing: a new pair of vectors every cycle (no internal stall). Latency is
// 2*DSP_LAT + ceil(log2 DIN^2) + 1 cycles (ttn_pkg::fp_node_latency). Every
// register advances on `en`, so a downstream stall freezes the pipeline.
// The weights are static registers and need no alignment with the data.
// Rounding (truncation) and saturation points are this design's choice.
module tc_full_parallel
  import ttn_pkg::*;
#(
  parameter int unsigned DIN     = 2,
  parameter int unsigned DOUT    = 2,
  parameter int unsigned W       = 16,
  parameter int unsigned FRAC    = 14,
  parameter int unsigned DSP_LAT = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                in_valid,
  input  logic signed [W-1:0] x [DIN],
  input  logic signed [W-1:0] y [DIN],
  input  logic signed [W-1:0] v [DOUT][DIN][DIN],
  output logic                out_valid,
  output logic signed [W-1:0] z [DOUT]
);

  localparam int unsigned NP  = DIN * DIN;
  localparam int unsigned PW  = 2 * W - FRAC;
  localparam int unsigned SW  = PW + $clog2(NP);
  localparam int unsigned LAT = fp_node_latency(DIN, DSP_LAT);

  localparam logic signed [PW-1:0] PMAX = PW'((1 << (W - 1)) - 1);
  localparam logic signed [PW-1:0] PMIN = -PW'(1 << (W - 1));
  localparam logic signed [SW-1:0] SMAX = SW'((1 << (W - 1)) - 1);
  localparam logic signed [SW-1:0] SMIN = -SW'(1 << (W - 1));

  // Stage 1: cartesian product.
  logic signed [PW-1:0] xy_full [NP];
  logic signed [W-1:0]  xy      [NP];
  for (genvar j = 0; j < DIN; j++) begin : g_s1j
    for (genvar k = 0; k < DIN; k++) begin : g_s1k
      ttn_mul #(.W(W), .FRAC(FRAC), .LAT(DSP_LAT)) u_mul (
        .clk, .en, .a(x[j]), .b(y[k]), .p(xy_full[j*DIN+k])
      );
      assign xy[j*DIN+k] = (xy_full[j*DIN+k] > PMAX) ? W'(PMAX) :
                           (xy_full[j*DIN+k] < PMIN) ? W'(PMIN) :
                           W'(xy_full[j*DIN+k]);
    end
  end

  // Stages 2 and 3: weighting and adder trees, one per output component.
  for (genvar i = 0; i < DOUT; i++) begin : g_out
    logic signed [PW-1:0] wp [NP];
    logic signed [SW-1:0] s;
    for (genvar jk = 0; jk < NP; jk++) begin : g_s2
      ttn_mul #(.W(W), .FRAC(FRAC), .LAT(DSP_LAT)) u_mul (
        .clk, .en, .a(xy[jk]), .b(v[i][jk / DIN][jk % DIN]), .p(wp[jk])
      );
    end
    adder_tree #(.NIN(NP), .IW(PW)) u_tree (.clk, .en, .din(wp), .sum(s));

    always_ff @(posedge clk) begin
      if (en)
        z[i] <= (s > SMAX) ? W'(SMAX) : (s < SMIN) ? W'(SMIN) : W'(s);
    end
  end

  // Valid pipeline, same depth as the datapath.
  logic [LAT-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vpipe <= '0;
    else if (en) vpipe <= {vpipe[LAT-2:0], in_valid};
  end
  assign out_valid = vpipe[LAT-1];

endmodule
