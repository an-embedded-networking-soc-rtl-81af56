// aal5_tx: ATM transmit port (AAL5 segmentation, UTOPIA cell interface) with a
// frame buffer filled by the DMM.
//
// The DMM pushes a frame exactly as into the Ethernet MACs: 32-bit big-endian
// words, each with its number of valid bytes (1..4) and a last flag. The push
// side adds the byte counts up and records each complete frame's length in a
// length FIFO (the buffer keeps only data and byte count). A frame of L bytes is then sent as one AAL5 CPCS-PDU on the
// port's virtual circuit: a two-byte zero pad (RFC 2684 VC multiplexing of a
// bridged Ethernet frame without FCS), the frame, zero fill, and the 8-byte
// trailer (UU = 0, CPI = 0, Length = L + 2, CRC-32 over everything before
// it). The PDU is a whole number of 48-byte cell payloads; each cell gets the
// 4-byte header (GFC 0, VPI, VCI, PTI bit 0 set on the last cell, CLP 0) and
// its HEC.
//
// UTOPIA-style transmit: a cell starts only when the PHY's tx_clav is high;
// its 53 bytes then go out on consecutive clocks with tx_enb_n low, tx_soc
// marking the first byte, followed by at least one idle clock. sent counts
// PDUs. `space` is the number of free buffer words, forced to 0 while the
// length FIFO cannot take another frame, so the DMM's rule "start a frame
// only if it fits" also protects the length FIFO.
//
// The paper names the ATM port type only; the segmentation and the cell
// format follow the AAL5 and ATM standards, while the single circuit, the
// cell-level handshake and all sizes are this design's choices.
module aal5_tx
  import gf_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 1024,
  parameter int unsigned LEN_FIFO  = 16,
  parameter logic [7:0]  VPI       = 8'd0,
  parameter logic [15:0] VCI       = 16'd32,
  localparam int unsigned AW = $clog2(BUF_WORDS),
  localparam int unsigned LW = $clog2(LEN_FIFO)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push_valid,
  input  logic [31:0]   push_data,
  input  logic [2:0]    push_nb,
  input  logic          push_last,
  output logic [AW:0]   space,
  // UTOPIA transmit
  input  logic          tx_clav,
  output logic          tx_enb_n,
  output logic          tx_soc,
  output logic [7:0]    tx_data,
  output logic [15:0]   sent
);
  typedef struct packed {
    logic [31:0] data;
    logic [2:0]  nb;
  } ent_t;

  ent_t        buffer [BUF_WORDS];
  logic [AW:0] wp, rp;
  len_t        lfifo  [LEN_FIFO];
  logic [LW:0] lwp, lrp;
  len_t        acc_len;        // bytes of the frame being pushed

  logic        pdu;            // a PDU is being sent
  logic        in_cell;
  logic [5:0]  c;              // next byte of the cell
  logic [15:0] k;              // next byte of the PDU
  len_t        flen;           // frame length L
  logic [15:0] npdu;           // PDU length, multiple of 48
  logic        last_cell;
  logic [2:0]  bidx;
  logic [31:0] crc;

  logic [LW:0] lcount;
  assign lcount = lwp - lrp;
  assign space  = (32'(lcount) + 1 >= LEN_FIFO) ? '0 : (AW+1)'(BUF_WORDS) - (wp - rp);

  ent_t cur;
  assign cur = buffer[rp[AW-1:0]];

  logic [31:0] hdr;
  assign hdr = {4'h0, VPI, VCI, 2'b00, last_cell, 1'b0};

  // byte k of the PDU
  logic [7:0]  pbyte;
  logic [15:0] tl;
  assign tl = 16'(flen) + 16'd2;
  always_comb begin
    pbyte = 8'h00;
    if (k >= 16'd2 && k < tl) pbyte = cur.data[8*(3 - int'(bidx[1:0])) +: 8];
    else if (k == npdu - 16'd6) pbyte = tl[15:8];
    else if (k == npdu - 16'd5) pbyte = tl[7:0];
    else if (k == npdu - 16'd4) pbyte = ~crc[31:24];
    else if (k == npdu - 16'd3) pbyte = ~crc[23:16];
    else if (k == npdu - 16'd2) pbyte = ~crc[15:8];
    else if (k == npdu - 16'd1) pbyte = ~crc[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; lwp <= '0; lrp <= '0; acc_len <= '0;
      pdu <= 1'b0; in_cell <= 1'b0; c <= '0; k <= '0; flen <= '0; npdu <= '0;
      last_cell <= 1'b0; bidx <= '0; crc <= '1;
      tx_enb_n <= 1'b1; tx_soc <= 1'b0; tx_data <= '0; sent <= '0;
    end else begin
      if (push_valid) begin
        buffer[wp[AW-1:0]] <= '{data: push_data, nb: push_nb};
        wp <= wp + 1'b1;
        if (push_last) begin
          lfifo[lwp[LW-1:0]] <= acc_len + len_t'(push_nb);
          lwp     <= lwp + 1'b1;
          acc_len <= '0;
        end else acc_len <= acc_len + len_t'(push_nb);
      end

      tx_enb_n <= 1'b1;
      tx_soc   <= 1'b0;
      if (!in_cell) begin
        if (tx_clav && (pdu || lwp != lrp)) begin
          logic [15:0] kk, nn;
          kk = k; nn = npdu;
          if (!pdu) begin
            // new PDU: payload cells for L + 2 + 8 bytes
            flen <= lfifo[lrp[LW-1:0]];
            lrp  <= lrp + 1'b1;
            nn   = 16'((32'(lfifo[lrp[LW-1:0]]) + 10 + 47) / 48 * 48);
            kk   = '0;
            npdu <= nn; k <= '0; crc <= '1; bidx <= '0; pdu <= 1'b1;
          end
          last_cell <= (kk + 16'd48 >= nn);
          in_cell   <= 1'b1;
          c         <= 6'd1;
          tx_enb_n  <= 1'b0;
          tx_soc    <= 1'b1;
          tx_data   <= hdr[31:24];     // GFC and upper VPI bits
        end
      end else begin
        tx_enb_n <= 1'b0;
        c        <= c + 1'b1;
        if (c < 6'd4) tx_data <= hdr[8*(3 - int'(c[1:0])) +: 8];
        else if (c == 6'd4) tx_data <= atm_hec(hdr);
        else begin
          tx_data <= pbyte;
          k       <= k + 1'b1;
          if (k < npdu - 16'd4) crc <= crc32_msb_byte(crc, pbyte);
          if (k >= 16'd2 && k < tl) begin
            if (32'(bidx) + 1 == 32'(cur.nb)) begin
              rp   <= rp + 1'b1;
              bidx <= '0;
            end else bidx <= bidx + 1'b1;
          end
          if (c == 6'd52) begin
            in_cell <= 1'b0;
            if (last_cell) begin
              pdu  <= 1'b0;
              sent <= sent + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
