// tsh: Traffic Shaper, one leaky bucket per output flow of a port.
//
// Each flow's bucket holds a fill level in bytes (8 fractional bits). Every
// cycle the level leaks by the flow's configured rate; every packet the port
// sends from the flow adds its length. A flow conforms, and may be picked by
// the output scheduler, while its level is at or below its configured depth,
// so over time it sends at most `rate` bytes per cycle plus a burst of `depth`
// bytes. A rate of zero switches shaping off for the flow (always conforms);
// that is the state after reset.
//
// Interface: cfg_we writes rate (bytes/cycle, 8.8 fixed point) and depth
// (bytes) of flow cfg_flow; done_valid/done_flow/done_len report each packet
// sent; conform[i] is a registered per-flow flag, valid one cycle after a
// change. The leaky-bucket algorithm is the paper's; the fixed-point format,
// the conformance rule and the zero-rate convention are this design's.
module tsh #(
  parameter int unsigned NF = 16,
  localparam int unsigned FW = $clog2(NF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [FW-1:0] cfg_flow,
  input  logic [15:0]   cfg_rate,
  input  logic [15:0]   cfg_depth,
  input  logic          done_valid,
  input  logic [FW-1:0] done_flow,
  input  logic [15:0]   done_len,
  output logic [NF-1:0] conform
);
  logic [15:0] rate  [NF];
  logic [15:0] depth [NF];
  logic [31:0] level [NF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NF; i++) begin
        rate[i]  <= '0;
        depth[i] <= '0;
        level[i] <= '0;
      end
      conform <= '1;
    end else begin
      for (int i = 0; i < NF; i++) begin
        logic [31:0] lv;
        lv = (level[i] > 32'(rate[i])) ? level[i] - 32'(rate[i]) : 32'd0;
        if (done_valid && done_flow == FW'(i) && rate[i] != 0)
          lv = lv + {8'd0, done_len, 8'd0};
        level[i]   <= lv;
        conform[i] <= (rate[i] == 0) || (lv <= {8'd0, depth[i], 8'd0});
      end
      if (cfg_we) begin
        rate[cfg_flow]  <= cfg_rate;
        depth[cfg_flow] <= cfg_depth;
        level[cfg_flow] <= '0;
      end
    end
  end
endmodule
