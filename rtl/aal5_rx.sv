// aal5_rx: ATM receive port (UTOPIA cell interface, AAL5 reassembly) with a
// frame buffer for the DMM.
//
// Cells arrive one byte per transfer over a UTOPIA-style interface: the core
// pulls bytes with rx_enb_n low, the PHY offers them with rx_clav high, and a
// byte moves on every clock edge where both hold; rx_soc marks the first
// byte of a 53-byte cell (4 header bytes, HEC, 48 payload bytes). A cell is
// taken only if its HEC is right and its VPI/VCI is the port's virtual
// circuit (VPI, VCI parameters); other cells, OAM cells (PTI bit 2) and cells
// with a bad HEC are counted in cells_dropped. The payloads of the circuit's
// cells are reassembled into one AAL5 CPCS-PDU; the cell whose PTI bit 0 is
// set ends it. The PDU trailer (UU, CPI, 16-bit length, CRC-32) is checked:
// CRC residue, a length that fits the number of cells, and the carried frame
// length. The PDU carries a bridged Ethernet frame without its FCS behind a
// two-byte pad (RFC 2684 VC multiplexing); pad, padding and trailer are not
// part of the frame handed on.
//
// Read side, as the Ethernet MACs: frm_avail, frm_len (frame bytes),
// rd_idx/rd_data (32-bit big-endian words, combinational read) and frm_pop.
// Frames are committed to a circular buffer of BUF_WORDS words; a PDU that
// fails a check or does not fit is rewound and counted in drops.
//
// The network port itself is named as one of the three interface types that
// connect directly to the DMM; UTOPIA, AAL5 and the encapsulation are the
// standard ones. The single virtual circuit per port (so PDUs of different
// circuits are never interleaved), the transfer rule of the interface and all
// sizes are this design's choices.
module aal5_rx
  import gf_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 1024,
  parameter int unsigned LEN_FIFO  = 16,
  parameter int unsigned MAX_FRAME = 1518,
  parameter logic [7:0]  VPI       = 8'd0,
  parameter logic [15:0] VCI       = 16'd32,
  localparam int unsigned AW = $clog2(BUF_WORDS),
  localparam int unsigned LW = $clog2(LEN_FIFO)
) (
  input  logic          clk,
  input  logic          rst_n,
  // UTOPIA receive
  input  logic          rx_clav,
  output logic          rx_enb_n,
  input  logic          rx_soc,
  input  logic [7:0]    rx_data,
  // frame buffer read side
  output logic          frm_avail,
  output len_t          frm_len,
  input  logic [AW-1:0] rd_idx,
  output logic [31:0]   rd_data,
  input  logic          frm_pop,
  output logic [15:0]   frames_ok,
  output logic [15:0]   drops,
  output logic [15:0]   cells_dropped
);
  typedef struct packed {
    logic [AW-1:0] start;
    logic [AW:0]   nwords;
    len_t          len;
  } frm_t;

  logic [31:0] buffer [BUF_WORDS];
  frm_t        lfifo  [LEN_FIFO];
  logic [LW:0] lwp, lrp;

  logic [5:0]    idx;        // byte position within the cell, 53 = no cell
  logic [31:0]   hdr;
  logic          take;       // current cell belongs to the PDU
  logic [AW-1:0] rd_ptr, fstart;
  logic [AW:0]   wcount, used;
  logic [23:0]   acc;
  logic [1:0]    nacc;
  logic [15:0]   pbytes;     // PDU bytes so far
  logic [7:0]    ncells;
  logic [31:0]   crc;
  logic          bad;
  logic [15:0]   plen;       // length field of the trailer

  logic lfull;
  assign lfull     = (lwp[LW] != lrp[LW]) && (lwp[LW-1:0] == lrp[LW-1:0]);
  assign frm_avail = (lwp != lrp);
  assign frm_len   = lfifo[lrp[LW-1:0]].len;
  assign rd_data   = buffer[AW'(lfifo[lrp[LW-1:0]].start + rd_idx)];

  logic [AW:0] space;
  assign space = (AW+1)'(BUF_WORDS) - used - wcount;

  // always ready to take bytes: a PDU that does not fit is dropped
  assign rx_enb_n = !rst_n;
  logic xfer;
  assign xfer = rx_clav && !rx_enb_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= 6'd53; hdr <= '0; take <= 1'b0; rd_ptr <= '0; fstart <= '0; wcount <= '0;
      used <= '0; acc <= '0; nacc <= '0; pbytes <= '0; ncells <= '0; crc <= '1;
      bad <= 1'b0; plen <= '0; lwp <= '0; lrp <= '0;
      frames_ok <= '0; drops <= '0; cells_dropped <= '0;
    end else begin
      logic [AW:0] used_n;
      used_n = used;
      if (frm_pop && frm_avail) begin
        rd_ptr <= AW'(lfifo[lrp[LW-1:0]].start + lfifo[lrp[LW-1:0]].nwords);
        used_n = used_n - lfifo[lrp[LW-1:0]].nwords;
        lrp    <= lrp + 1'b1;
      end
      if (xfer) begin
        logic [5:0] i;
        i = rx_soc ? 6'd0 : idx;
        idx <= (i >= 6'd52) ? 6'd53 : i + 1'b1;
        if (i < 6'd4) hdr <= {hdr[23:0], rx_data};
        else if (i == 6'd4) begin
          // HEC, circuit and cell type decide whether the payload is taken
          take <= (rx_data == atm_hec(hdr)) && hdr[27:20] == VPI && hdr[19:4] == VCI && !hdr[3];
          if (!((rx_data == atm_hec(hdr)) && hdr[27:20] == VPI && hdr[19:4] == VCI && !hdr[3]))
            cells_dropped <= cells_dropped + 1'b1;
          else if (pbytes == 0) begin
            // first cell of a PDU
            fstart <= AW'(rd_ptr + used_n);
            wcount <= '0; nacc <= '0; crc <= '1; bad <= 1'b0; ncells <= '0;
          end
        end else if (i <= 6'd52 && take) begin
          crc    <= crc32_msb_byte(crc, rx_data);
          pbytes <= pbytes + 1'b1;
          if (pbytes >= 16'd2) begin
            acc  <= {acc[15:0], rx_data};
            nacc <= nacc + 1'b1;
            if (nacc == 2'd3) begin
              if (space == 0) bad <= 1'b1;
              else begin
                buffer[AW'(fstart + wcount)] <= {acc[23:0], rx_data};
                wcount <= wcount + 1'b1;
              end
            end
          end
          if (i == 6'd47) plen[15:8] <= rx_data;
          if (i == 6'd48) plen[7:0]  <= rx_data;
          if (i == 6'd52) begin
            ncells <= ncells + 1'b1;
            if (hdr[1]) begin
              // last cell: check the trailer and commit or rewind
              logic [31:0] crc_n;
              logic [15:0] ncell_need;
              logic        ok;
              crc_n      = crc32_msb_byte(crc, rx_data);
              ncell_need = (plen + 16'd8 + 16'd47) / 16'd48;
              ok = !bad && crc_n == 32'hC704DD7B && ncell_need == 16'(ncells) + 1'b1 &&
                   plen >= 16'd16 && 32'(plen) <= MAX_FRAME + 2 && !lfull;
              if (ok) begin
                lfifo[lwp[LW-1:0]] <= '{start: fstart, nwords: wcount,
                                        len: plen - 16'd2};
                lwp       <= lwp + 1'b1;
                used_n    = used_n + wcount;
                frames_ok <= frames_ok + 1'b1;
              end else begin
                drops <= drops + 1'b1;
              end
              pbytes <= '0;
              wcount <= '0;
            end else if (32'(pbytes) + 1 > MAX_FRAME + 56) begin
              bad <= 1'b1;
            end
          end
        end
      end
      used <= used_n;
    end
  end
endmodule
