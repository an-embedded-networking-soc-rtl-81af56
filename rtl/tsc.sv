// tsc: Task Scheduler.
//
// Turns packet arrivals into work for the packet processing units (PPUs).
// The DMM reports every complete packet it has queued on an input flow; the
// scheduler keeps these requests in one FIFO per priority level and, whenever
// a PPU can take work, sends the DMM a FETCH command that dequeues the head
// packet of the chosen flow and copies its first HDR_BYTES bytes into that
// PPU's DP-RAM. When the DMM answers, the PPU is told which packet and which
// DP-RAM buffer to work on.
//
//   * Priorities are weighted: a round gives priority level p up to weight[p]
//     dispatches, higher levels first; a new round starts when no non-empty
//     level has credit left.
//   * Load balancing: each PPU has SLOTS header buffers in its DP-RAM (at word
//     slot*SLOT_WORDS), so a header can be fetched while the PPU still works on
//     the previous packet, hiding the transfer time. A request goes to the PPU
//     with the fewest outstanding tasks (round-robin among equals).
//   * A PPU pulses ppu_done[k] when it has finished a task.
//
// Interface: arrival (valid, flow, prio); DMM command port (valid/ready +
// one-cycle response); per-PPU task notification (task_valid[k] with flow,
// pkt, len, slot); ovf counts arrivals lost to a full FIFO.
// Timing: one task in flight to the DMM at a time; the command is offered the
// cycle after the choice is made.
//
// The paper gives the role (priorities, PPU availability, header fetch on the
// scheduler's request, weighted scheduling and load balancing); the FIFOs,
// the credit scheme and the buffer slots are this design's.
module tsc
  import gf_pkg::*;
#(
  parameter int unsigned NPPU       = 4,
  parameter int unsigned NPRIO      = 4,
  parameter int unsigned DEPTH      = 64,
  parameter int unsigned SLOTS      = 2,
  parameter int unsigned SLOT_WORDS = 256,
  parameter int unsigned HDR_BYTES  = 64,
  localparam int unsigned PW = (NPRIO > 1) ? $clog2(NPRIO) : 1,
  localparam int unsigned KW = (NPPU > 1) ? $clog2(NPPU) : 1,
  localparam int unsigned DW = $clog2(DEPTH),
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // packet arrival from the DMM
  input  logic            arr_valid,
  input  flow_t           arr_flow,
  input  logic [PW-1:0]   arr_prio,
  // weights
  input  logic            cfg_we,
  input  logic [PW-1:0]   cfg_prio,
  input  logic [3:0]      cfg_weight,
  // DMM command port
  output logic            cmd_valid,
  input  logic            cmd_ready,
  output dmm_cmd_t        cmd,
  input  logic            rsp_valid,
  input  dmm_rsp_t        rsp,
  // PPUs
  input  logic [NPPU-1:0] ppu_done,
  output logic [NPPU-1:0] task_valid,
  output flow_t           task_flow,
  output pktid_t          task_pkt,
  output len_t            task_len,
  output logic [SW-1:0]   task_slot,
  output logic [15:0]     ovf
);
  typedef enum logic [1:0] {T_IDLE, T_CMD, T_WAIT} tstate_e;

  flow_t           fifo [NPRIO][DEPTH];
  logic [DW:0]     wp [NPRIO];
  logic [DW:0]     rp [NPRIO];
  logic [3:0]      weight [NPRIO];
  logic [3:0]      credit [NPRIO];
  logic [$clog2(SLOTS+1)-1:0] outst [NPPU];
  logic [SW-1:0]   nslot [NPPU];
  logic [KW-1:0]   rr;

  tstate_e         st;
  logic [KW-1:0]   k_sel;
  logic [PW-1:0]   p_sel;
  flow_t           f_sel;

  logic [NPRIO-1:0] nonempty, full;
  always_comb
    for (int p = 0; p < NPRIO; p++) begin
      nonempty[p] = (wp[p] != rp[p]);
      full[p]     = (wp[p][DW] != rp[p][DW]) && (wp[p][DW-1:0] == rp[p][DW-1:0]);
    end

  // priority level to serve: highest non-empty level with credit
  logic          p_any, p_credit_any;
  logic [PW-1:0] p_pick;
  always_comb begin
    p_any = 1'b0; p_pick = '0; p_credit_any = 1'b0;
    for (int p = NPRIO - 1; p >= 0; p--)
      if (!p_any && nonempty[p] && credit[p] != 0) begin
        p_any = 1'b1; p_pick = PW'(p);
      end
    p_credit_any = p_any;
  end

  // PPU to use: fewest outstanding tasks, round-robin among equals
  logic          k_any;
  logic [KW-1:0] k_pick;
  always_comb begin
    int unsigned best;
    k_any = 1'b0; k_pick = '0; best = SLOTS;
    for (int j = 0; j < NPPU; j++) begin
      int unsigned k;
      k = (int'(rr) + j) % NPPU;
      if (int'(outst[k]) < best) begin
        best = int'(outst[k]); k_pick = KW'(k); k_any = 1'b1;
      end
    end
  end

  assign cmd_valid = (st == T_CMD);
  always_comb begin
    cmd         = '0;
    cmd.op      = DMM_FETCH;
    cmd.flow    = f_sel;
    cmd.ppu     = PPU_W'(k_sel);
    cmd.dp_base = DPA_W'(32'(nslot[k_sel]) * SLOT_WORDS);
    cmd.nbytes  = 11'(HDR_BYTES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; k_sel <= '0; p_sel <= '0; f_sel <= '0; rr <= '0; ovf <= '0;
      task_valid <= '0; task_flow <= '0; task_pkt <= '0; task_len <= '0; task_slot <= '0;
      for (int p = 0; p < NPRIO; p++) begin
        wp[p] <= '0; rp[p] <= '0;
        weight[p] <= 4'(1 << (p % 4));
        credit[p] <= 4'(1 << (p % 4));
      end
      for (int k = 0; k < NPPU; k++) begin
        outst[k] <= '0; nslot[k] <= '0;
      end
    end else begin
      task_valid <= '0;
      if (cfg_we) weight[cfg_prio] <= cfg_weight;
      if (arr_valid) begin
        if (full[arr_prio]) ovf <= ovf + 1'b1;
        else begin
          fifo[arr_prio][wp[arr_prio][DW-1:0]] <= arr_flow;
          wp[arr_prio] <= wp[arr_prio] + 1'b1;
        end
      end
      // completion and dispatch may both touch outst[]
      for (int k = 0; k < NPPU; k++) begin
        logic up, down;
        up   = (st == T_IDLE) && p_any && k_any && (k_pick == KW'(k));
        down = ppu_done[k] || ((st == T_WAIT) && rsp_valid && !rsp.ok && (k_sel == KW'(k)));
        if (up && !down) outst[k] <= outst[k] + 1'b1;
        else if (down && !up && outst[k] != 0) outst[k] <= outst[k] - 1'b1;
      end
      unique case (st)
        T_IDLE: begin
          if (p_any && k_any) begin
            p_sel  <= p_pick;
            k_sel  <= k_pick;
            f_sel  <= fifo[p_pick][rp[p_pick][DW-1:0]];
            rp[p_pick]     <= rp[p_pick] + 1'b1;
            credit[p_pick] <= credit[p_pick] - 1'b1;
            rr     <= KW'((int'(k_pick) + 1) % NPPU);
            st     <= T_CMD;
          end else if (!p_credit_any && nonempty != 0) begin
            for (int p = 0; p < NPRIO; p++) credit[p] <= weight[p];
          end
        end
        T_CMD: if (cmd_ready) st <= T_WAIT;
        T_WAIT: if (rsp_valid) begin
          st <= T_IDLE;
          if (rsp.ok) begin
            task_valid[k_sel] <= 1'b1;
            task_flow <= f_sel;
            task_pkt  <= rsp.data[15:0];
            task_len  <= rsp.data[31:16];
            task_slot <= nslot[k_sel];
            nslot[k_sel] <= SW'((int'(nslot[k_sel]) + 1) % SLOTS);
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
