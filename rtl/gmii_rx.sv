// gmii_rx: Ethernet MAC receive side with a frame buffer for the DMM.
//
// Takes the GMII receive byte stream (rx_dv, rx_er, rxd) qualified by a byte
// strobe `ce` (1 every cycle for Gigabit Ethernet; every other MII clock for
// Fast Ethernet through mii_adapt), removes the preamble and start-of-frame
// delimiter, checks the FCS and stores the frame, big-endian (first byte in
// bits 31:24), as 32-bit words in a circular buffer of BUF_WORDS words.
// A frame is committed only if its FCS is right, it had no rx_er, it is
// 64..MAX_FRAME bytes long (FCS included) and it fitted in the buffer;
// otherwise the write pointer is rewound and `drops` counts it.
//
// Read side (to the DMM): frm_avail says a committed frame is waiting,
// frm_len gives its length without FCS, rd_data is word rd_idx of that frame
// (combinational read), and a frm_pop pulse frees the frame. Up to LEN_FIFO
// committed frames can wait.
//
// The paper only names the Gigabit Ethernet MAC and connects it directly to
// the DMM; the frame-buffer interface, the acceptance rules and the sizes are
// this design's.
module gmii_rx
  import gf_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 1024,
  parameter int unsigned LEN_FIFO  = 16,
  parameter int unsigned MAX_FRAME = 1522,
  localparam int unsigned AW = $clog2(BUF_WORDS),
  localparam int unsigned LW = $clog2(LEN_FIFO)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          rx_dv,
  input  logic          rx_er,
  input  logic [7:0]    rxd,
  output logic          frm_avail,
  output len_t          frm_len,
  input  logic [AW-1:0] rd_idx,
  output logic [31:0]   rd_data,
  input  logic          frm_pop,
  output logic [15:0]   frames_ok,
  output logic [15:0]   drops
);
  typedef enum logic [1:0] {R_IDLE, R_PRE, R_DATA, R_DROP} rstate_e;
  typedef struct packed {
    logic [AW-1:0] start;
    logic [AW:0]   nwords;
    len_t          len;
  } frm_t;

  logic [31:0] buffer [BUF_WORDS];
  frm_t        lfifo  [LEN_FIFO];
  logic [LW:0] lwp, lrp;

  rstate_e     st;
  logic [AW-1:0] rd_ptr;     // start of oldest frame
  logic [AW-1:0] fstart;     // start of frame being received
  logic [AW:0]   wcount;     // words written for this frame
  logic [31:0]   acc;
  logic [1:0]    nacc;
  len_t          nbytes;
  logic [31:0]   crc;
  logic          bad;
  logic [AW:0]   used;       // words held by committed frames

  logic lfull;
  assign lfull     = (lwp[LW] != lrp[LW]) && (lwp[LW-1:0] == lrp[LW-1:0]);
  assign frm_avail = (lwp != lrp);
  assign frm_len   = lfifo[lrp[LW-1:0]].len;
  assign rd_data   = buffer[AW'(lfifo[lrp[LW-1:0]].start + rd_idx)];

  // words free for the frame being received
  logic [AW:0] space;
  assign space = (AW+1)'(BUF_WORDS) - used - wcount;

  logic byte_in, frame_end;
  assign byte_in   = ce && rx_dv && (st == R_DATA);
  assign frame_end = ce && !rx_dv && (st == R_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; rd_ptr <= '0; fstart <= '0; wcount <= '0; acc <= '0; nacc <= '0;
      nbytes <= '0; crc <= '1; bad <= 1'b0; used <= '0; lwp <= '0; lrp <= '0;
      frames_ok <= '0; drops <= '0;
    end else begin
      logic [AW:0] used_n;
      used_n = used;
      if (frm_pop && frm_avail) begin
        rd_ptr <= AW'(lfifo[lrp[LW-1:0]].start + lfifo[lrp[LW-1:0]].nwords);
        used_n = used_n - lfifo[lrp[LW-1:0]].nwords;
        lrp    <= lrp + 1'b1;
      end
      if (ce) begin
        unique case (st)
          R_IDLE: if (rx_dv) st <= (rxd == 8'h55) ? R_PRE : (rxd == 8'hD5 ? R_DATA : R_DROP);
          R_PRE:  if (!rx_dv) st <= R_IDLE;
                  else if (rxd == 8'hD5) st <= R_DATA;
                  else if (rxd != 8'h55) st <= R_DROP;
          R_DATA: if (!rx_dv) st <= R_IDLE;
          R_DROP: if (!rx_dv) st <= R_IDLE;
          default: st <= R_IDLE;
        endcase
        if ((st == R_IDLE || st == R_PRE) && rx_dv && rxd == 8'hD5) begin
          fstart <= AW'(rd_ptr + used);
          wcount <= '0; nacc <= '0; nbytes <= '0; crc <= '1; bad <= 1'b0;
        end
      end
      if (byte_in) begin
        acc    <= {acc[23:0], rxd};
        nacc   <= nacc + 1'b1;
        nbytes <= nbytes + 1'b1;
        crc    <= crc32_byte(crc, rxd);
        if (rx_er || 32'(nbytes) >= MAX_FRAME) bad <= 1'b1;
        if (nacc == 2'd3) begin
          if (space == 0) bad <= 1'b1;
          else begin
            buffer[AW'(fstart + wcount)] <= {acc[23:0], rxd};
            wcount <= wcount + 1'b1;
          end
        end
      end
      if (frame_end) begin
        logic [AW:0] wtot;
        logic        ok;
        wtot = wcount + ($bits(wcount))'(nacc != 0);
        ok   = !bad && crc == 32'hDEBB20E3 && nbytes >= 16'd64 && !lfull &&
               (nacc == 0 || space != 0);
        if (nacc != 0 && space != 0)
          buffer[AW'(fstart + wcount)] <= acc << (8 * (4 - int'(nacc)));
        if (ok) begin
          lfifo[lwp[LW-1:0]] <= '{start: fstart, nwords: wtot, len: nbytes - 16'd4};
          lwp       <= lwp + 1'b1;
          used_n    = used_n + wtot;
          frames_ok <= frames_ok + 1'b1;
        end else begin
          drops <= drops + 1'b1;
        end
        wcount <= '0;
      end
      used <= used_n;
    end
  end
endmodule
