// ttn_tree: full contraction of a binary tree tensor network.
//
// The N feature vectors phi[n] (dimension D each) enter the leaves. Layer l
// (1..L, L = log2 N) has N/2^l nodes; node m of layer l contracts the outputs
// of nodes 2m and 2m+1 of layer l-1 with its weight tensor of size
// X(l) x X(l-1) x X(l-1), where X(l) = ttn_pkg::bond_dim (D at the leaves,
// min(CHI, D^(2^l)) inside, 1 at the root). The root output is the scalar
// decision value of the binary classifier.
//
// ARCH selects the node implementation: ARCH_FULL uses tc_full_parallel
// nodes (one sample per cycle, the whole tree stalls as one pipeline when
// out_ready is low), ARCH_PARTIAL uses tc_partial_parallel nodes chained by
// valid/ready. Latency is ttn_pkg::tree_latency cycles from the accepted
// input to out_valid.
//
// Weights come as one flat array in the ttn_pkg layout. All bond dimensions
// are fixed at elaboration, as the hyperparameters are fixed by the build.
module ttn_tree
  import ttn_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned D       = 2,
  parameter int unsigned CHI     = 4,
  parameter int unsigned W       = 16,
  parameter int unsigned FRAC    = 14,
  parameter int unsigned DSP_LAT = 3,
  parameter arch_e       ARCH    = ARCH_FULL,
  localparam int unsigned NW     = total_weights(N, D, CHI)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] phi [N][D],
  input  logic signed [W-1:0] weights [NW],
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_value
);

  localparam int unsigned L  = $clog2(N);
  localparam int unsigned XM = max_bond(N, D, CHI);

  // vec[l][n]: output vector of node n of layer l (layer 0: feature map).
  logic signed [W-1:0] vec [L+1][N][XM];
  logic                vld [L+1][N];
  logic                rdy [L+1][N];   // ready of the consumer of vec[l][n]
  logic                nrdy [N];       // input ready of the layer-1 nodes
  logic                en;             // pipeline enable (full parallel)
  logic                l1_ready;       // all leaves' nodes can accept

  assign en = !out_valid || out_ready;

  // Layer 0: the feature map vectors.
  for (genvar n = 0; n < N; n++) begin : g_leaf
    for (genvar i = 0; i < XM; i++) begin : g_i
      if (i < D) begin : g_d
        assign vec[0][n][i] = phi[n][i];
      end else begin : g_z
        assign vec[0][n][i] = '0;
      end
    end
    assign vld[0][n] = in_valid;
  end

  for (genvar l = 1; l <= L; l++) begin : g_layer
    localparam int unsigned DIN  = bond_dim(l - 1, N, D, CHI);
    localparam int unsigned DOUT = bond_dim(l, N, D, CHI);
    localparam int unsigned OFF  = layer_offset(l, N, D, CHI);
    localparam int unsigned NWN  = node_weights(l, N, D, CHI);

    for (genvar n = 0; n < N; n++) begin : g_node
      if (n < (N >> l)) begin : g_used
        logic signed [W-1:0] xl [DIN];
        logic signed [W-1:0] yl [DIN];
        logic signed [W-1:0] vn [DOUT][DIN][DIN];
        logic signed [W-1:0] zl [DOUT];
        logic                ivalid, iready, ovalid;

        for (genvar j = 0; j < DIN; j++) begin : g_in
          assign xl[j] = vec[l-1][2*n][j];
          assign yl[j] = vec[l-1][2*n+1][j];
        end
        for (genvar i = 0; i < DOUT; i++) begin : g_vi
          for (genvar j = 0; j < DIN; j++) begin : g_vj
            for (genvar k = 0; k < DIN; k++) begin : g_vk
              assign vn[i][j][k] = weights[OFF + n * NWN + (i * DIN + j) * DIN + k];
            end
          end
        end
        for (genvar i = 0; i < XM; i++) begin : g_out
          if (i < DOUT) begin : g_d
            assign vec[l][n][i] = zl[i];
          end else begin : g_z
            assign vec[l][n][i] = '0;
          end
        end

        if (ARCH == ARCH_FULL) begin : g_fp
          assign ivalid = vld[l-1][2*n];
          tc_full_parallel #(
            .DIN(DIN), .DOUT(DOUT), .W(W), .FRAC(FRAC), .DSP_LAT(DSP_LAT)
          ) u_node (
            .clk, .rst_n, .en, .in_valid(ivalid), .x(xl), .y(yl), .v(vn),
            .out_valid(ovalid), .z(zl)
          );
          assign iready = en;
        end else begin : g_pp
          // Both children must be valid together; the leaves start together.
          assign ivalid = (l == 1) ? (in_valid && l1_ready)
                                   : (vld[l-1][2*n] && vld[l-1][2*n+1]);
          tc_partial_parallel #(
            .DIN(DIN), .DOUT(DOUT), .W(W), .FRAC(FRAC), .DSP_LAT(DSP_LAT)
          ) u_node (
            .clk, .rst_n, .in_valid(ivalid), .in_ready(iready), .x(xl), .y(yl),
            .v(vn), .out_valid(ovalid), .out_ready(rdy[l][n]), .z(zl)
          );
        end

        if (l == 1) begin : g_nrdy
          assign nrdy[n] = iready;
        end
        assign vld[l][n]       = ovalid;
        assign rdy[l-1][2*n]   = iready && ivalid;
        assign rdy[l-1][2*n+1] = iready && ivalid;
      end else begin : g_unused
        for (genvar i = 0; i < XM; i++) begin : g_z
          assign vec[l][n][i] = '0;
        end
        assign vld[l][n] = 1'b0;
        if (n >= 2 * (N >> l)) begin : g_r
          assign rdy[l-1][n] = 1'b0;
        end
      end
    end
  end

  for (genvar n = N / 2; n < N; n++) begin : g_nrdy_unused
    assign nrdy[n] = 1'b0;
  end

  assign rdy[L][0] = out_ready;
  for (genvar n = 1; n < N; n++) begin : g_rdy_top
    assign rdy[L][n] = 1'b0;
  end

  // The leaves' nodes are identical and start together.
  always_comb begin
    l1_ready = 1'b1;
    for (int unsigned n = 0; n < N / 2; n++) l1_ready &= nrdy[n];
  end

  if (ARCH == ARCH_FULL) begin : g_rdy_fp
    assign in_ready = en;
  end else begin : g_rdy_pp
    assign in_ready = l1_ready;
  end

  assign out_valid = vld[L][0];
  assign out_value = vec[L][0][0];

endmodule
