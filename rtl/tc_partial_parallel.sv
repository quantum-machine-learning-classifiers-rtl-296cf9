// tc_partial_parallel: one tree-tensor-network node, partially parallel.
//
// Computes the same contraction as tc_full_parallel,
//   z[i] = sum_j sum_k V[i][j][k] * x[j] * y[k],
// with DIN^2 + 1 multipliers instead of DIN^2 * (DOUT + 1):
//   1. one multiplier forms the DIN^2 products x[j]*y[k] one per cycle
//      (rescaled and saturated to W bits) into a product buffer;
//   2. the buffer is copied to DIN^2 operand registers, each feeding its own
//      multiplier, and the weights of one output component i are applied per
//      cycle, i = 0 .. DOUT-1;
//   3. every cycle the DIN^2 weighted products of one component are summed
//      in a single registered adder and saturated to W bits.
// Stage 1 of the next sample overlaps stages 2-3 of the current one.
//
// Interface: valid/ready on both sides. in_ready is high while stage 1 is
// free; the result vector z is held with out_valid until out_ready.
// Timing: latency DIN^2 + DOUT + 2*DSP_LAT + 2 cycles from the cycle the
// input is accepted to the first cycle of out_valid (ttn_pkg::pp_node_latency), i.e. quadratic in the
// bond dimension; a new input is taken every DIN^2 + DSP_LAT + 2 cycles at
// best. The scheduling and handshakes are this design's reading of the
// serial scheme; rounding and saturation match the full-parallel node.
module tc_partial_parallel
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
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] x [DIN],
  input  logic signed [W-1:0] y [DIN],
  input  logic signed [W-1:0] v [DOUT][DIN][DIN],
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] z [DOUT]
);

  localparam int unsigned NP  = DIN * DIN;
  localparam int unsigned PW  = 2 * W - FRAC;
  localparam int unsigned SW  = PW + $clog2(NP) + 1;
  localparam int unsigned AIW = $clog2(NP + 1);
  localparam int unsigned BIW = $clog2(DOUT + 1);

  localparam logic signed [PW-1:0] PMAX = PW'((1 << (W - 1)) - 1);
  localparam logic signed [PW-1:0] PMIN = -PW'(1 << (W - 1));
  localparam logic signed [SW-1:0] SMAX = SW'((1 << (W - 1)) - 1);
  localparam logic signed [SW-1:0] SMIN = -SW'(1 << (W - 1));

  // ---------------- stage 1: serial cartesian product ----------------
  logic                a_busy, p_full;
  logic [AIW-1:0]      a_cnt;
  logic signed [W-1:0] xa [DIN];
  logic signed [W-1:0] ya [DIN];
  logic                a_issue;
  logic signed [W-1:0] a_op, b_op;
  logic signed [PW-1:0] a_prod;
  logic                a_vpipe [DSP_LAT];
  logic [AIW-1:0]      a_ipipe [DSP_LAT];
  logic signed [W-1:0] p_buf [NP];
  logic signed [W-1:0] p_reg [NP];
  logic                b_busy;
  logic                xfer;

  assign in_ready = !a_busy;
  assign a_issue  = a_busy && (a_cnt < AIW'(NP));
  assign xfer     = p_full && !b_busy;
  assign a_op     = xa[a_cnt / AIW'(DIN)];
  assign b_op     = ya[a_cnt % AIW'(DIN)];

  ttn_mul #(.W(W), .FRAC(FRAC), .LAT(DSP_LAT)) u_mul_xy (
    .clk, .en(1'b1), .a(a_op), .b(b_op), .p(a_prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_busy <= 1'b0;
      a_cnt  <= '0;
      p_full <= 1'b0;
      for (int unsigned s = 0; s < DSP_LAT; s++) a_vpipe[s] <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        a_busy <= 1'b1;
        a_cnt  <= '0;
      end else if (a_issue) begin
        a_cnt <= a_cnt + 1'b1;
      end
      a_vpipe[0] <= a_issue;
      for (int unsigned s = 1; s < DSP_LAT; s++) a_vpipe[s] <= a_vpipe[s-1];
      if (a_vpipe[DSP_LAT-1] && a_ipipe[DSP_LAT-1] == AIW'(NP - 1))
        p_full <= 1'b1;
      if (xfer) begin
        p_full <= 1'b0;
        a_busy <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      xa <= x;
      ya <= y;
    end
    a_ipipe[0] <= a_cnt;
    for (int unsigned s = 1; s < DSP_LAT; s++) a_ipipe[s] <= a_ipipe[s-1];
    if (a_vpipe[DSP_LAT-1])
      p_buf[a_ipipe[DSP_LAT-1]] <= (a_prod > PMAX) ? W'(PMAX) :
                                   (a_prod < PMIN) ? W'(PMIN) : W'(a_prod);
    if (xfer) p_reg <= p_buf;
  end

  // ---------------- stages 2 and 3: weighting and serial sums ----------------
  logic [BIW-1:0]       b_cnt;
  logic                 b_issue;
  logic signed [PW-1:0] wp [NP];
  logic                 b_vpipe [DSP_LAT];
  logic [BIW-1:0]       b_ipipe [DSP_LAT];
  logic signed [SW-1:0] s_comb;

  assign b_issue = b_busy && (b_cnt < BIW'(DOUT));

  for (genvar jk = 0; jk < NP; jk++) begin : g_s2
    ttn_mul #(.W(W), .FRAC(FRAC), .LAT(DSP_LAT)) u_mul_w (
      .clk, .en(1'b1), .a(p_reg[jk]),
      .b(v[(b_cnt < BIW'(DOUT)) ? b_cnt : '0][jk / DIN][jk % DIN]),
      .p(wp[jk])
    );
  end

  always_comb begin
    s_comb = '0;
    for (int unsigned jk = 0; jk < NP; jk++) s_comb += SW'(wp[jk]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_busy    <= 1'b0;
      b_cnt     <= '0;
      out_valid <= 1'b0;
      for (int unsigned s = 0; s < DSP_LAT; s++) b_vpipe[s] <= 1'b0;
    end else begin
      if (xfer) begin
        b_busy <= 1'b1;
        b_cnt  <= '0;
      end else if (b_issue) begin
        b_cnt <= b_cnt + 1'b1;
      end
      b_vpipe[0] <= b_issue;
      for (int unsigned s = 1; s < DSP_LAT; s++) b_vpipe[s] <= b_vpipe[s-1];
      if (b_vpipe[DSP_LAT-1] && b_ipipe[DSP_LAT-1] == BIW'(DOUT - 1))
        out_valid <= 1'b1;
      if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        b_busy    <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    b_ipipe[0] <= b_cnt;
    for (int unsigned s = 1; s < DSP_LAT; s++) b_ipipe[s] <= b_ipipe[s-1];
    if (b_vpipe[DSP_LAT-1])
      z[b_ipipe[DSP_LAT-1]] <= (s_comb > SMAX) ? W'(SMAX) :
                               (s_comb < SMIN) ? W'(SMIN) : W'(s_comb);
  end

endmodule
