// mii_adapt: Fast Ethernet MII nibble adapter for the Ethernet MAC.
//
// Lets the byte-wide MAC (gmii_rx / gmii_tx) serve an MII port. The MII side
// runs at one nibble per `mii_ce` strobe (the MII clock, sampled in the core
// clock domain); nibbles go least significant first, as MII sends them.
//   Receive: two nibbles are joined into a byte and passed on with a one-cycle
//   rx_ce strobe; while mii_rx_dv is low every strobe is passed on with
//   rx_dv low, which ends a frame in the MAC.
//   Transmit: the MAC is strobed (tx_ce) once per two MII strobes; its byte is
//   sent as low then high nibble.
// The paper lists the Fast Ethernet MAC (MII) among the interfaces; this
// adapter, sharing the MAC core between MII and GMII, is this design's choice.
module mii_adapt (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mii_ce,
  // MII receive pins
  input  logic       mii_rx_dv,
  input  logic       mii_rx_er,
  input  logic [3:0] mii_rxd,
  // to the MAC receive side
  output logic       rx_ce,
  output logic       rx_dv,
  output logic       rx_er,
  output logic [7:0] rxd,
  // from the MAC transmit side
  output logic       tx_ce,
  input  logic       tx_en,
  input  logic [7:0] txd,
  // MII transmit pins
  output logic       mii_tx_en,
  output logic [3:0] mii_txd
);
  logic       rx_half, tx_phase, er_seen;
  logic [3:0] low;

  assign tx_ce = mii_ce && tx_phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_half <= 1'b0; low <= '0; er_seen <= 1'b0;
      rx_ce <= 1'b0; rx_dv <= 1'b0; rx_er <= 1'b0; rxd <= '0;
      tx_phase <= 1'b0; mii_tx_en <= 1'b0; mii_txd <= '0;
    end else begin
      rx_ce <= 1'b0;
      if (mii_ce) begin
        if (mii_rx_dv) begin
          if (!rx_half) begin
            low     <= mii_rxd;
            er_seen <= mii_rx_er;
            rx_half <= 1'b1;
          end else begin
            rx_ce   <= 1'b1;
            rx_dv   <= 1'b1;
            rx_er   <= er_seen | mii_rx_er;
            rxd     <= {mii_rxd, low};
            rx_half <= 1'b0;
          end
        end else begin
          rx_ce   <= 1'b1;
          rx_dv   <= 1'b0;
          rx_er   <= 1'b0;
          rx_half <= 1'b0;
        end
        // transmit
        if (!tx_phase) begin
          mii_tx_en <= tx_en;
          mii_txd   <= txd[3:0];
        end else begin
          mii_txd   <= txd[7:4];
        end
        tx_phase <= !tx_phase;
      end
    end
  end
endmodule
