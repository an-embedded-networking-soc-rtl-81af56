// gmii_tx: Ethernet MAC transmit side with a frame buffer filled by the DMM.
//
// The DMM pushes a frame as a sequence of 32-bit words, big-endian, each with
// the number of valid bytes (1..4) in it and a last flag; word counts need not
// be full, so a header and a body held in different buffers can be joined
// without realignment. Once a whole frame is in the buffer (store and
// forward, so the line never underruns) the MAC sends 7 preamble bytes, the
// start-of-frame delimiter, the frame bytes, zero padding up to 60 bytes, the
// FCS (least significant byte first) and then keeps tx_en low for IFG byte
// times. Each byte is held for one `ce` strobe (1 every cycle for Gigabit
// Ethernet, slower for Fast Ethernet through mii_adapt).
//
// Interface: push_valid/push_data/push_nb/push_last (no ready: the DMM only
// starts a frame when `space`, the number of free buffer entries, can hold
// it); GMII tx_en, tx_er, txd; sent counts transmitted frames.
//
// The paper only names the MAC; the buffer, its interface and the sizes are
// this design's. Padding, FCS and the 12-byte gap are the Ethernet standard's.
module gmii_tx
  import gf_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 1024,
  parameter int unsigned IFG       = 12,
  localparam int unsigned AW = $clog2(BUF_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          push_valid,
  input  logic [31:0]   push_data,
  input  logic [2:0]    push_nb,
  input  logic          push_last,
  output logic [AW:0]   space,
  output logic          tx_en,
  output logic          tx_er,
  output logic [7:0]    txd,
  output logic [15:0]   sent
);
  typedef enum logic [2:0] {T_IDLE, T_PRE, T_DATA, T_PAD, T_FCS, T_GAP} tstate_e;
  typedef struct packed {
    logic [31:0] data;
    logic [2:0]  nb;
    logic        last;
  } ent_t;

  ent_t        buffer [BUF_WORDS];
  logic [AW:0] wp, rp;
  logic [7:0]  nframes;       // complete frames in the buffer

  tstate_e     st;
  logic [3:0]  cnt;
  logic [2:0]  bidx;          // byte within current word
  len_t        nbytes;
  logic [31:0] crc;

  assign space = (AW+1)'(BUF_WORDS) - (wp - rp);
  assign tx_er = 1'b0;

  ent_t cur;
  assign cur = buffer[rp[AW-1:0]];
  logic [7:0] cur_byte;
  assign cur_byte = cur.data[8*(3 - int'(bidx[1:0])) +: 8];

  logic frame_pushed, frame_taken;
  assign frame_pushed = push_valid && push_last;
  assign frame_taken  = ce && st == T_IDLE && nframes != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; nframes <= '0; st <= T_IDLE; cnt <= '0; bidx <= '0;
      nbytes <= '0; crc <= '1; tx_en <= 1'b0; txd <= '0; sent <= '0;
    end else begin
      if (push_valid) begin
        buffer[wp[AW-1:0]] <= '{data: push_data, nb: push_nb, last: push_last};
        wp <= wp + 1'b1;
      end
      if (frame_pushed && !frame_taken) nframes <= nframes + 1'b1;
      else if (frame_taken && !frame_pushed) nframes <= nframes - 1'b1;

      if (ce) begin
        unique case (st)
          T_IDLE: begin
            tx_en <= 1'b0;
            if (nframes != 0) begin
              st <= T_PRE; cnt <= '0;
              tx_en <= 1'b1; txd <= 8'h55;
            end
          end
          T_PRE: begin
            cnt <= cnt + 1'b1;
            txd <= (cnt == 4'd6) ? 8'hD5 : 8'h55;
            if (cnt == 4'd7) begin
              st <= T_DATA; bidx <= '0; nbytes <= '0; crc <= '1;
              txd <= cur_byte;
            end
          end
          default: ;
        endcase
        // byte output for data / pad / fcs happens below, one byte per strobe
        if (st == T_DATA) begin
          // the byte on txd was byte bidx of entry rp
          logic [7:0] b;
          b = cur_byte;
          crc    <= crc32_byte(crc, b);
          nbytes <= nbytes + 1'b1;
          if (32'(bidx) + 1 == 32'(cur.nb)) begin
            rp   <= rp + 1'b1;
            bidx <= '0;
            if (cur.last) begin
              if (nbytes + 16'd1 < 16'd60) begin st <= T_PAD; txd <= 8'h00; end
              else begin
                logic [31:0] c;
                c = crc32_byte(crc, b);
                st <= T_FCS; cnt <= '0;
                txd <= ~c[7:0];
              end
            end else begin
              txd <= buffer[AW'(rp[AW-1:0] + 1'b1)].data[31:24];
            end
          end else begin
            bidx <= bidx + 1'b1;
            txd  <= cur.data[8*(2 - int'(bidx[1:0])) +: 8];
          end
        end else if (st == T_PAD) begin
          crc    <= crc32_byte(crc, 8'h00);
          nbytes <= nbytes + 1'b1;
          if (nbytes + 16'd1 < 16'd60) txd <= 8'h00;
          else begin
            logic [31:0] c;
            c = crc32_byte(crc, 8'h00);
            st <= T_FCS; cnt <= '0;
            txd <= ~c[7:0];
            crc <= c;
          end
        end else if (st == T_FCS) begin
          cnt <= cnt + 1'b1;
          unique case (cnt)
            4'd0: txd <= ~crc[15:8];
            4'd1: txd <= ~crc[23:16];
            4'd2: txd <= ~crc[31:24];
            default: begin
              tx_en <= 1'b0; txd <= '0; st <= T_GAP; cnt <= '0; sent <= sent + 1'b1;
            end
          endcase
        end else if (st == T_GAP) begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) + 2 >= IFG) st <= T_IDLE;
        end
      end
    end
  end
endmodule
