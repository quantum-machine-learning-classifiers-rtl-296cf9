// axil_weight_regs: AXI4-Lite slave holding the network weights.
//
// NW signed W-bit weights sit in a register block, one per 32-bit word:
// weight n is at byte address 4*n (layout in ttn_pkg). A write takes the
// low W bits of WDATA (byte strobes honoured); a read returns the weight
// sign-extended to 32 bits. Addresses at or beyond 4*NW answer SLVERR and
// change nothing. The weights drive the contraction nodes directly, so a
// new network or quantization can be loaded without rebuilding.
//
// Timing: a write is taken in the cycle both AWVALID and WVALID are high
// (AWREADY = WREADY = 1 then) and answered on B the next cycle; a read
// address is taken when no read response is pending and answered the next
// cycle. Register contents reset to zero. Using AXI4-Lite for the weights
// follows the described firmware; the address map is this design's choice.
module axil_weight_regs #(
  parameter int unsigned NW     = 208,
  parameter int unsigned W      = 16,
  parameter int unsigned ADDR_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // write address / data / response
  input  logic [ADDR_W-1:0]   s_axil_awaddr,
  input  logic                s_axil_awvalid,
  output logic                s_axil_awready,
  input  logic [31:0]         s_axil_wdata,
  input  logic [3:0]          s_axil_wstrb,
  input  logic                s_axil_wvalid,
  output logic                s_axil_wready,
  output logic [1:0]          s_axil_bresp,
  output logic                s_axil_bvalid,
  input  logic                s_axil_bready,
  // read address / data
  input  logic [ADDR_W-1:0]   s_axil_araddr,
  input  logic                s_axil_arvalid,
  output logic                s_axil_arready,
  output logic [31:0]         s_axil_rdata,
  output logic [1:0]          s_axil_rresp,
  output logic                s_axil_rvalid,
  input  logic                s_axil_rready,
  // weights
  output logic signed [W-1:0] weights [NW]
);

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam int unsigned IW = ADDR_W - 2;

  logic          wr_fire, rd_fire;
  logic [IW-1:0] widx, ridx;
  logic [31:0]   cur, merged;

  assign s_axil_awready = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_wready  = s_axil_awready;
  assign wr_fire        = s_axil_awready;
  assign widx           = s_axil_awaddr[ADDR_W-1:2];

  assign s_axil_arready = !s_axil_rvalid;
  assign rd_fire        = s_axil_arvalid && s_axil_arready;
  assign ridx           = s_axil_araddr[ADDR_W-1:2];

  always_comb begin
    cur = (widx < IW'(NW)) ? 32'(weights[widx]) : '0;
    for (int b = 0; b < 4; b++)
      merged[8*b +: 8] = s_axil_wstrb[b] ? s_axil_wdata[8*b +: 8] : cur[8*b +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < NW; n++) weights[n] <= '0;
      s_axil_bvalid <= 1'b0;
      s_axil_bresp  <= RESP_OKAY;
      s_axil_rvalid <= 1'b0;
      s_axil_rresp  <= RESP_OKAY;
      s_axil_rdata  <= '0;
    end else begin
      if (wr_fire) begin
        s_axil_bvalid <= 1'b1;
        if (widx < IW'(NW)) begin
          weights[widx] <= W'(merged);
          s_axil_bresp  <= RESP_OKAY;
        end else begin
          s_axil_bresp  <= RESP_SLVERR;
        end
      end else if (s_axil_bready) begin
        s_axil_bvalid <= 1'b0;
      end

      if (rd_fire) begin
        s_axil_rvalid <= 1'b1;
        if (ridx < IW'(NW)) begin
          s_axil_rdata <= 32'(weights[ridx]);
          s_axil_rresp <= RESP_OKAY;
        end else begin
          s_axil_rdata <= '0;
          s_axil_rresp <= RESP_SLVERR;
        end
      end else if (s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end
    end
  end

endmodule
