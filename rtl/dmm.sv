// dmm: Data Memory Manager.
//
// Stores every packet once, in a segmented packet memory, and keeps per-flow
// queues (up to NFLOWS = 32K) of descriptors that point at stored packets. A
// packet can sit in several queues at the same time (a reference count tells
// when its storage can be freed), move between queues without its data being
// copied, have its header read into a processing unit's DP-RAM and have its
// first segment replaced by a new header written back from that DP-RAM. The
// payload is written once on reception and read once on transmission.
//
// Data structures (all arrays here; the paper keeps data in DRAM and the
// structures in SRAM):
//   dmem      NSEG segments of SEG_WORDS 32-bit words, big-endian bytes
//   seg_next  next segment of a packet / of the free list;  seg_nb bytes used
//   pkt_*     per packet: first and last segment, segment count, length, refs
//   desc_*    queue element: packet id and next element
//   q_*       per flow: head, tail, packet count (cleared after reset, one
//             flow per cycle, NFLOWS cycles, while init_done is low)
// Free segments, packets and descriptors are kept in linked free lists that
// are first filled lazily from a never-used counter, so they need no reset
// sweep. Freeing a packet splices its whole segment chain onto the free list
// in one cycle.
//
// One engine serves, round-robin, three sources: a frame waiting in a
// receive port buffer (store it, queue it on the port's input flow, tell the
// task scheduler), a transmit request of the output schedulers (dequeue the
// head packet of an output flow, stream it to the port's transmit buffer,
// release it) and a command from the command port (see gf_pkg::dmm_op_e).
// Every queue append and removal is reported on enq_evt / deq_evt.
//
// Timing: one word per cycle for packet data (reception, transmission, header
// read and write); 1-3 cycles for pure queue operations; the response is a
// one-cycle rsp_valid pulse. READ_HDR and FETCH copy at most the first segment
// (the response also gives its byte count); WRITE_HDR replaces the first
// segment by nbytes new bytes, which may take more than one segment.
//
// From the paper: per-flow queues for 32K flows, variable-length packet
// storage, header transfers to the processing units through their DP-RAMs,
// store-once with a packet in many queues, enqueue/dequeue and further queue
// commands, arrival notices to the task scheduler. The segment size, the
// memory sizes, the exact command set and all formats are this design's.
module dmm
  import gf_pkg::*;
#(
  parameter int unsigned NFLOWS    = 32768,
  parameter int unsigned NSEG      = 4096,
  parameter int unsigned SEG_WORDS = 16,
  parameter int unsigned NPKT      = 1024,
  parameter int unsigned NDESC     = 2048,
  parameter int unsigned NPORT     = 3,
  parameter int unsigned NPPU      = 4,
  parameter int unsigned RX_AW     = 10,
  localparam int unsigned SGW = $clog2(NSEG),
  localparam int unsigned WW  = $clog2(SEG_WORDS),
  localparam int unsigned PKW = $clog2(NPKT),
  localparam int unsigned DSW = $clog2(NDESC),
  localparam int unsigned QFW = $clog2(NFLOWS),
  localparam int unsigned PTW = (NPORT > 1) ? $clog2(NPORT) : 1,
  localparam int unsigned KW  = (NPPU > 1) ? $clog2(NPPU) : 1,
  localparam int unsigned SEG_BYTES = 4 * SEG_WORDS
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               init_done,
  // command port
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  dmm_cmd_t           cmd,
  output logic               rsp_valid,
  output dmm_rsp_t           rsp,
  // receive port buffers
  input  logic [NPORT-1:0]   rx_avail,
  input  len_t               rx_len  [NPORT],
  output logic [RX_AW-1:0]   rx_idx,
  input  logic [31:0]        rx_data [NPORT],
  output logic [NPORT-1:0]   rx_pop,
  // input flow and priority of each port
  input  logic               cfg_we,
  input  logic [PTW-1:0]     cfg_port,
  input  flow_t              cfg_flow,
  input  logic [1:0]         cfg_prio,
  // arrival notice to the task scheduler
  output logic               arr_valid,
  output flow_t              arr_flow,
  output logic [1:0]         arr_prio,
  // queue events
  output logic               enq_valid,
  output q_evt_t             enq_evt,
  output logic               deq_valid,
  output q_evt_t             deq_evt,
  // transmit requests and transmit buffers
  input  logic               tx_req_valid,
  output logic               tx_req_ready,
  input  flow_t              tx_req_flow,
  input  logic [PTW-1:0]     tx_req_port,
  output logic [NPORT-1:0]   tx_push,
  output logic [31:0]        tx_data,
  output logic [2:0]         tx_nb,
  output logic               tx_last,
  output logic               tx_done_valid,
  output logic [PTW-1:0]     tx_done_port,
  output len_t               tx_done_len,
  // DP-RAMs, DMM side (synchronous read)
  output logic [NPPU-1:0]    dp_we,
  output logic [DPA_W-1:0]   dp_addr,
  output logic [31:0]        dp_wdata,
  input  logic [31:0]        dp_rdata [NPPU],
  output logic [15:0]        rx_drops
);
  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_RX, S_RX_END, S_ENQ, S_DEQ, S_TX, S_REL,
    S_RD_SET, S_RD, S_WR, S_WR_LINK, S_WR_FREE, S_SKIP
  } dstate_e;

  // ---------------------------------------------------------------- storage
  logic [31:0]    dmem     [NSEG * SEG_WORDS];
  logic [SGW-1:0] seg_next [NSEG];
  logic [6:0]     seg_nb   [NSEG];
  logic [SGW-1:0] pkt_seg  [NPKT];
  logic [SGW-1:0] pkt_last [NPKT];
  logic [SGW-1:0] pkt_nseg [NPKT];
  len_t           pkt_len  [NPKT];
  logic [7:0]     pkt_ref  [NPKT];
  logic [PKW-1:0] pkt_fnext[NPKT];
  logic [PKW-1:0] desc_pkt [NDESC];
  logic [DSW-1:0] desc_next[NDESC];
  logic [DSW-1:0] q_head   [NFLOWS];
  logic [DSW-1:0] q_tail   [NFLOWS];
  logic [15:0]    q_cnt    [NFLOWS];
  flow_t          in_flow  [NPORT];
  logic [1:0]     in_prio  [NPORT];

  // free lists
  logic [SGW-1:0] sfl_head;  logic [SGW:0] sfl_cnt;  logic [SGW:0] sfresh;
  logic [PKW-1:0] pfl_head;  logic [PKW:0] pfl_cnt;  logic [PKW:0] pfresh;
  logic [DSW-1:0] dfl_head;  logic [DSW:0] dfl_cnt;  logic [DSW:0] dfresh;

  logic [SGW:0] seg_avail;
  logic         pkt_avail, desc_avail;
  logic [SGW-1:0] seg_new;
  logic [PKW-1:0] pkt_new;
  logic [DSW-1:0] desc_new;
  assign seg_avail  = sfl_cnt + ((SGW+1)'(NSEG) - sfresh);
  assign pkt_avail  = (pfl_cnt != 0) || (pfresh != (PKW+1)'(NPKT));
  assign desc_avail = (dfl_cnt != 0) || (dfresh != (DSW+1)'(NDESC));
  assign seg_new    = (sfl_cnt != 0) ? sfl_head : SGW'(sfresh);
  assign pkt_new    = (pfl_cnt != 0) ? pfl_head : PKW'(pfresh);
  assign desc_new   = (dfl_cnt != 0) ? dfl_head : DSW'(dfresh);

  // ---------------------------------------------------------------- engine
  dstate_e        st;
  logic [1:0]     svc;          // round-robin pointer: 0 rx, 1 tx, 2 cmd
  logic [PTW-1:0] rx_rr;
  dmm_cmd_t       c;
  logic           from_rx, from_tx, from_cmd, move_d;
  logic [PTW-1:0] p;
  logic [QFW-1:0] f;
  logic [PKW-1:0] k;
  logic [DSW-1:0] d;
  len_t           L;
  logic [11:0]    widx;          // word index in the current segment / transfer
  logic [11:0]    nw;            // words to transfer
  len_t           left;          // bytes left
  logic [SGW-1:0] cur, first, old_first;
  logic [SGW-1:0] nseg;
  logic [QFW:0]   init_idx;
  logic           wr_pend;       // WRITE_HDR: a DP-RAM word arrives this cycle

  // receive port to serve next
  logic           rx_any;
  logic [PTW-1:0] rx_pick;
  always_comb begin
    rx_any = 1'b0; rx_pick = '0;
    for (int j = 1; j <= NPORT; j++) begin
      int unsigned q;
      q = (int'(rx_rr) + j) % NPORT;
      if (!rx_any && rx_avail[q]) begin rx_any = 1'b1; rx_pick = PTW'(q); end
    end
  end

  logic go_rx, go_tx, go_cmd;
  always_comb begin
    go_rx = 1'b0; go_tx = 1'b0; go_cmd = 1'b0;
    if (st == S_IDLE) begin
      unique case (svc)
        2'd0:    if (rx_any) go_rx = 1'b1; else if (tx_req_valid) go_tx = 1'b1; else if (cmd_valid) go_cmd = 1'b1;
        2'd1:    if (tx_req_valid) go_tx = 1'b1; else if (cmd_valid) go_cmd = 1'b1; else if (rx_any) go_rx = 1'b1;
        default: if (cmd_valid) go_cmd = 1'b1; else if (rx_any) go_rx = 1'b1; else if (tx_req_valid) go_tx = 1'b1;
      endcase
    end
  end
  assign cmd_ready    = go_cmd;
  assign tx_req_ready = go_tx;
  assign init_done    = (st != S_INIT);

  // combinational read helpers
  logic [WW-1:0]  wofs;
  assign wofs   = WW'(widx);
  assign rx_idx = RX_AW'(nw);     // word of the frame being received

  function automatic len_t min_len(input len_t a, input len_t b);
    return (a < b) ? a : b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_INIT; svc <= '0; rx_rr <= '0; c <= '0;
      from_rx <= 1'b0; from_tx <= 1'b0; from_cmd <= 1'b0; move_d <= 1'b0;
      p <= '0; f <= '0; k <= '0; d <= '0; L <= '0; widx <= '0; nw <= '0; left <= '0;
      cur <= '0; first <= '0; old_first <= '0; nseg <= '0; init_idx <= '0; wr_pend <= 1'b0;
      sfl_head <= '0; sfl_cnt <= '0; sfresh <= '0;
      pfl_head <= '0; pfl_cnt <= '0; pfresh <= '0;
      dfl_head <= '0; dfl_cnt <= '0; dfresh <= '0;
      for (int i = 0; i < NPORT; i++) begin
        in_flow[i] <= flow_t'(i);
        in_prio[i] <= '0;
      end
      rsp_valid <= 1'b0; rsp <= '0;
      arr_valid <= 1'b0; arr_flow <= '0; arr_prio <= '0;
      enq_valid <= 1'b0; enq_evt <= '0; deq_valid <= 1'b0; deq_evt <= '0;
      tx_push <= '0; tx_data <= '0; tx_nb <= '0; tx_last <= 1'b0;
      tx_done_valid <= 1'b0; tx_done_port <= '0; tx_done_len <= '0;
      rx_pop <= '0; rx_drops <= '0;
    end else begin
      rsp_valid <= 1'b0; arr_valid <= 1'b0; enq_valid <= 1'b0; deq_valid <= 1'b0;
      tx_push <= '0; tx_done_valid <= 1'b0; rx_pop <= '0;
      if (cfg_we) begin
        in_flow[cfg_port] <= cfg_flow;
        in_prio[cfg_port] <= cfg_prio;
      end

      unique case (st)
        // clear the per-flow packet counts
        S_INIT: begin
          q_cnt[QFW'(init_idx)] <= '0;
          init_idx <= init_idx + 1'b1;
          if (init_idx == (QFW+1)'(NFLOWS - 1)) st <= S_IDLE;
        end

        S_IDLE: begin
          from_rx <= go_rx; from_tx <= go_tx; from_cmd <= go_cmd; move_d <= 1'b0;
          if (go_rx || go_tx || go_cmd) svc <= (svc == 2'd2) ? 2'd0 : svc + 1'b1;
          if (go_rx) begin
            logic [SGW:0] need;
            need  = (SGW+1)'((32'(rx_len[rx_pick]) + SEG_BYTES - 1) / SEG_BYTES);
            p     <= rx_pick;
            rx_rr <= rx_pick;
            L     <= rx_len[rx_pick];
            left  <= rx_len[rx_pick];
            if (need <= seg_avail && pkt_avail && desc_avail && rx_len[rx_pick] != 0) begin
              k <= pkt_new;
              if (pfl_cnt != 0) begin pfl_head <= pkt_fnext[pfl_head]; pfl_cnt <= pfl_cnt - 1'b1; end
              else pfresh <= pfresh + 1'b1;
              widx <= '0; nw <= '0; nseg <= '0;
              st   <= S_RX;
            end else begin
              rx_pop[rx_pick] <= 1'b1;
              rx_drops <= rx_drops + 1'b1;
              st <= S_SKIP;       // let the port see the pop before the next choice
            end
          end
          if (go_tx) begin
            p <= tx_req_port;
            f <= QFW'(tx_req_flow);
            if (q_cnt[QFW'(tx_req_flow)] == 0) begin
              tx_done_valid <= 1'b1; tx_done_port <= tx_req_port; tx_done_len <= '0;
            end else st <= S_DEQ;
          end
          if (go_cmd) begin
            c <= cmd;
            f <= QFW'(cmd.flow);
            k <= PKW'(cmd.pkt);
            unique case (cmd.op)
              DMM_ENQUEUE:
                if (desc_avail && pkt_ref[PKW'(cmd.pkt)] != 0) st <= S_ENQ;
                else begin rsp_valid <= 1'b1; rsp <= '0; end
              DMM_DEQUEUE, DMM_FETCH, DMM_MOVE:
                if (q_cnt[QFW'(cmd.flow)] != 0) st <= S_DEQ;
                else begin rsp_valid <= 1'b1; rsp <= '0; end
              DMM_COPY:
                if (q_cnt[QFW'(cmd.flow)] != 0 && desc_avail) begin
                  k <= desc_pkt[q_head[QFW'(cmd.flow)]];
                  f <= QFW'(cmd.dst);
                  st <= S_ENQ;
                end else begin rsp_valid <= 1'b1; rsp <= '0; end
              DMM_RELEASE: st <= S_REL;
              DMM_READ_HDR: st <= S_RD_SET;
              DMM_WRITE_HDR: begin
                logic [SGW:0] need;
                need = (SGW+1)'((32'(cmd.nbytes) + SEG_BYTES - 1) / SEG_BYTES);
                if (cmd.nbytes != 0 && need <= seg_avail && pkt_ref[PKW'(cmd.pkt)] != 0) begin
                  widx <= '0; nw <= '0; nseg <= '0; left <= len_t'(cmd.nbytes);
                  wr_pend <= 1'b0;
                  old_first <= pkt_seg[PKW'(cmd.pkt)];
                  st <= S_WR;
                end else begin rsp_valid <= 1'b1; rsp <= '0; end
              end
              DMM_QLEN: begin
                rsp_valid <= 1'b1;
                rsp <= '{ok: 1'b1, data: 32'(q_cnt[QFW'(cmd.flow)])};
              end
              DMM_PKT_LEN: begin
                rsp_valid <= 1'b1;
                rsp <= '{ok: pkt_ref[PKW'(cmd.pkt)] != 0,
                         data: {pkt_len[PKW'(cmd.pkt)], 9'd0, seg_nb[pkt_seg[PKW'(cmd.pkt)]]}};
              end
              default: begin rsp_valid <= 1'b1; rsp <= '0; end
            endcase
          end
        end

        // store a received frame, one word per cycle (nw counts frame words)
        S_RX: begin
          logic [SGW-1:0] s;
          s = cur;
          if (widx == 0) begin
            s = seg_new;
            if (sfl_cnt != 0) begin sfl_head <= seg_next[sfl_head]; sfl_cnt <= sfl_cnt - 1'b1; end
            else sfresh <= sfresh + 1'b1;
            if (nw == 0) first <= s;
            else seg_next[cur] <= s;
            seg_nb[s] <= 7'(min_len(left, len_t'(SEG_BYTES)));
            nseg <= nseg + 1'b1;
            cur  <= s;
          end
          dmem[{s, wofs}] <= rx_data[p];
          nw   <= nw + 1'b1;
          widx <= (widx == 12'(SEG_WORDS - 1)) ? '0 : widx + 1'b1;
          left <= (left > 16'd4) ? left - 16'd4 : '0;
          if (left <= 16'd4) st <= S_RX_END;
        end

        S_RX_END: begin
          pkt_seg[k]  <= first;
          pkt_last[k] <= cur;
          pkt_nseg[k] <= nseg;
          pkt_len[k]  <= L;
          pkt_ref[k]  <= '0;
          rx_pop[p]   <= 1'b1;
          f           <= QFW'(in_flow[p]);
          st          <= S_ENQ;
        end

        // append packet k (or, for MOVE, descriptor d) to queue f
        S_ENQ: begin
          logic [DSW-1:0] nd;
          nd = d;
          if (!move_d) begin
            nd = desc_new;
            if (dfl_cnt != 0) begin dfl_head <= desc_next[dfl_head]; dfl_cnt <= dfl_cnt - 1'b1; end
            else dfresh <= dfresh + 1'b1;
            desc_pkt[nd] <= k;
            pkt_ref[k]   <= pkt_ref[k] + 1'b1;
          end
          if (q_cnt[f] == 0) q_head[f] <= nd;
          else desc_next[q_tail[f]] <= nd;
          q_tail[f] <= nd;
          q_cnt[f]  <= q_cnt[f] + 1'b1;
          enq_valid <= 1'b1;
          enq_evt   <= '{flow: flow_t'(f), len: pkt_len[k]};
          if (from_rx) begin
            arr_valid <= 1'b1;
            arr_flow  <= flow_t'(f);
            arr_prio  <= in_prio[p];
          end else begin
            rsp_valid <= 1'b1;
            rsp       <= '{ok: 1'b1, data: {pkt_len[k], 16'(k)}};
          end
          st <= S_IDLE;
        end

        // remove the head of queue f
        S_DEQ: begin
          logic [DSW-1:0] hd;
          logic [PKW-1:0] hk;
          hd = q_head[f];
          hk = desc_pkt[hd];
          k  <= hk;
          d  <= hd;
          L  <= pkt_len[hk];
          q_head[f] <= desc_next[hd];
          q_cnt[f]  <= q_cnt[f] - 1'b1;
          deq_valid <= 1'b1;
          deq_evt   <= '{flow: flow_t'(f), len: pkt_len[hk]};
          if (from_cmd && c.op == DMM_MOVE) begin
            move_d <= 1'b1;
            f      <= QFW'(c.dst);
            st     <= S_ENQ;
          end else begin
            desc_next[hd] <= dfl_head;
            dfl_head <= hd;
            dfl_cnt  <= dfl_cnt + 1'b1;
            if (from_tx) begin
              cur  <= pkt_seg[hk];
              left <= len_t'(seg_nb[pkt_seg[hk]]);
              nseg <= pkt_nseg[hk];
              widx <= '0;
              st   <= S_TX;
            end else if (c.op == DMM_FETCH) begin
              st <= S_RD_SET;
            end else begin
              rsp_valid <= 1'b1;
              rsp <= '{ok: 1'b1, data: {pkt_len[hk], 16'(hk)}};
              st  <= S_IDLE;
            end
          end
        end

        // stream packet k to transmit port p
        S_TX: begin
          len_t nb;
          nb = min_len(left, 16'd4);
          tx_push[p] <= 1'b1;
          tx_data    <= dmem[{cur, wofs}];
          tx_nb      <= 3'(nb);
          tx_last    <= (left <= 16'd4) && (nseg == 1);
          if (left <= 16'd4) begin
            if (nseg == 1) st <= S_REL;
            else begin
              cur  <= seg_next[cur];
              left <= len_t'(seg_nb[seg_next[cur]]);
              nseg <= nseg - 1'b1;
              widx <= '0;
            end
          end else begin
            left <= left - 16'd4;
            widx <= widx + 1'b1;
          end
        end

        // drop one reference of packet k
        S_REL: begin
          logic ok;
          ok = (pkt_ref[k] != 0);
          if (ok) begin
            pkt_ref[k] <= pkt_ref[k] - 1'b1;
            if (pkt_ref[k] == 8'd1) begin
              seg_next[pkt_last[k]] <= sfl_head;
              sfl_head <= pkt_seg[k];
              sfl_cnt  <= sfl_cnt + (SGW+1)'(pkt_nseg[k]);
              pkt_fnext[k] <= pfl_head;
              pfl_head <= k;
              pfl_cnt  <= pfl_cnt + 1'b1;
            end
          end
          if (from_tx) begin
            tx_done_valid <= 1'b1; tx_done_port <= p; tx_done_len <= L;
          end else begin
            rsp_valid <= 1'b1;
            rsp <= '{ok: ok, data: '0};
          end
          st <= S_IDLE;
        end

        // copy the first segment of packet k (at most c.nbytes) to DP-RAM
        S_RD_SET: begin
          len_t n;
          n    = min_len(len_t'(c.nbytes), len_t'(seg_nb[pkt_seg[k]]));
          cur  <= pkt_seg[k];
          nw   <= 12'((n + 16'd3) >> 2);
          widx <= '0;
          if (n == 0 || pkt_ref[k] == 0) begin
            rsp_valid <= 1'b1;
            rsp <= '{ok: (pkt_ref[k] != 0), data: {pkt_len[k], (c.op == DMM_FETCH) ? 16'(k) : 16'(seg_nb[pkt_seg[k]])}};
            st  <= S_IDLE;
          end else st <= S_RD;
        end

        S_RD: begin
          widx <= widx + 1'b1;
          if (widx + 1'b1 == nw) begin
            rsp_valid <= 1'b1;
            rsp <= '{ok: 1'b1, data: {pkt_len[k], (c.op == DMM_FETCH) ? 16'(k) : 16'(seg_nb[cur])}};
            st  <= S_IDLE;
          end
        end

        // write c.nbytes from DP-RAM into new segments (nw counts words read)
        S_WR: begin
          if (32'(nw) < (32'(c.nbytes) + 3) / 4) nw <= nw + 1'b1;
          wr_pend <= (32'(nw) < (32'(c.nbytes) + 3) / 4);
          if (wr_pend) begin
            logic [SGW-1:0] s;
            s = cur;
            if (widx == 0) begin
              s = seg_new;
              if (sfl_cnt != 0) begin sfl_head <= seg_next[sfl_head]; sfl_cnt <= sfl_cnt - 1'b1; end
              else sfresh <= sfresh + 1'b1;
              if (nseg == 0) first <= s;
              else seg_next[cur] <= s;
              seg_nb[s] <= 7'(min_len(left, len_t'(SEG_BYTES)));
              nseg <= nseg + 1'b1;
              cur  <= s;
            end
            dmem[{s, wofs}] <= dp_rdata[KW'(c.ppu)];
            widx <= (widx == 12'(SEG_WORDS - 1)) ? '0 : widx + 1'b1;
            left <= (left > 16'd4) ? left - 16'd4 : '0;
            if (left <= 16'd4) st <= S_WR_LINK;
          end
        end

        S_WR_LINK: begin
          seg_next[cur] <= seg_next[old_first];
          st <= S_WR_FREE;
        end

        S_WR_FREE: begin
          seg_next[old_first] <= sfl_head;
          sfl_head <= old_first;
          sfl_cnt  <= sfl_cnt + 1'b1;
          pkt_seg[k] <= first;
          if (pkt_last[k] == old_first) pkt_last[k] <= cur;
          pkt_nseg[k] <= pkt_nseg[k] + nseg - 1'b1;
          pkt_len[k]  <= pkt_len[k] - len_t'(seg_nb[old_first]) + len_t'(c.nbytes);
          rsp_valid <= 1'b1;
          rsp <= '{ok: 1'b1, data: {pkt_len[k] - len_t'(seg_nb[old_first]) + len_t'(c.nbytes), 16'(k)}};
          st <= S_IDLE;
        end

        S_SKIP: st <= S_IDLE;

        default: st <= S_IDLE;
      endcase
    end
  end

  // DP-RAM port: header reads write DP-RAM, header writes read it
  always_comb begin
    dp_we    = '0;
    dp_addr  = c.dp_base + DPA_W'(nw);
    dp_wdata = dmem[{cur, wofs}];
    if (st == S_RD) begin
      dp_we[KW'(c.ppu)] = 1'b1;
      dp_addr      = c.dp_base + DPA_W'(widx);
    end
  end
endmodule
