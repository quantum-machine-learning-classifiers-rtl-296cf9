// adder_tree: pipelined binary adder tree.
//
// Sums NIN signed inputs of IW bits. The inputs are zero-padded to the next
// power of two and added pairwise, one register level per tree level, so the
// latency is LEVELS = ceil(log2 NIN) cycles (0 for NIN = 1, where the input
// is passed straight through as there is nothing to add). All levels advance
// on `en`. The output is IW + LEVELS bits wide and cannot overflow.
module adder_tree #(
  parameter int unsigned NIN = 4,
  parameter int unsigned IW  = 18,
  localparam int unsigned LEVELS = $clog2(NIN),
  localparam int unsigned OW     = IW + LEVELS
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic signed [IW-1:0] din [NIN],
  output logic signed [OW-1:0] sum
);

  if (LEVELS == 0) begin : g_single
    assign sum = OW'(din[0]);
  end else begin : g_tree
    localparam int unsigned NP = 1 << LEVELS;
    logic signed [OW-1:0] leaf  [NP];
    logic signed [OW-1:0] stage [LEVELS][NP/2];

    always_comb begin
      for (int unsigned i = 0; i < NP; i++)
        leaf[i] = (i < NIN) ? OW'(din[i]) : '0;
    end

    always_ff @(posedge clk) begin
      if (en) begin
        for (int unsigned i = 0; i < NP / 2; i++)
          stage[0][i] <= leaf[2*i] + leaf[2*i+1];
        for (int unsigned l = 1; l < LEVELS; l++)
          for (int unsigned i = 0; i < NP / 2; i++)
            stage[l][i] <= (i < (NP >> (l + 1))) ?
                           stage[l-1][2*i] + stage[l-1][2*i+1] : '0;
      end
    end

    assign sum = stage[LEVELS-1][0];
  end

endmodule
