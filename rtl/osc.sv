// osc: Output Scheduler for one network port (WF2Q-like, virtual-time based).
//
// Chooses which of the port's NF output flows sends its head packet next, so
// that the link is shared according to per-flow weights and priorities. The
// scheduler is work-conserving and orders flows by virtual times:
//   * each flow i keeps the finish tag F[i] of its last packet and a
//     configured virtual step per byte, vstep[i] (inverse of its weight);
//   * the system virtual time V is raised after every packet to the smallest
//     finish tag among backlogged flows (never lowered);
//   * only backlogged flows that the traffic shaper lets through and that
//     have the highest waiting priority compete (strict priority);
//   * of these, a flow is eligible when F[i] <= V, and the eligible flow with
//     the smallest estimated next finish max(V,F[i]) + LREF*vstep[i] wins; if
//     none is eligible the same rule is applied to all competing flows, so
//     the link never idles while a conforming packet waits;
//   * when the packet has gone, F[i] = max(V,F[i]) + len*vstep[i].
// Backlog is counted from the queue events of the DMM for flows
// BASE..BASE+NF-1. One packet is in flight at a time: after a grant the
// scheduler waits for done before choosing again.
//
// Interface: cfg_we writes vstep and prio (higher value wins) of a flow;
// enq/deq events carry global flow ids; port_ready gates a new choice;
// req_valid/req_ready hands the chosen global flow id to the DMM; done_valid
// and done_len report the packet sent. Latency: a choice is offered the cycle
// after the scheduler becomes idle with a candidate.
//
// The paper gives the purpose, weights, priorities, work conservation and the
// similarity to WF2Q with virtual times; the tag arithmetic above is this
// design's reading of it. Tags are 32 bits and are not protected against
// wrap-around.
module osc
  import gf_pkg::*;
#(
  parameter int unsigned NF   = 16,
  parameter int unsigned BASE = 0,
  parameter int unsigned LREF = 64,
  localparam int unsigned FW  = $clog2(NF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [FW-1:0] cfg_flow,
  input  logic [15:0]   cfg_vstep,
  input  logic [1:0]    cfg_prio,
  input  logic          enq_valid,
  input  flow_t         enq_flow,
  input  logic          deq_valid,
  input  flow_t         deq_flow,
  input  logic [NF-1:0] conform,
  input  logic          port_ready,
  output logic          req_valid,
  input  logic          req_ready,
  output flow_t         req_flow,
  input  logic          done_valid,
  input  logic [15:0]   done_len,
  output logic [31:0]   vtime
);
  typedef enum logic [1:0] {O_IDLE, O_REQ, O_WAIT} ostate_e;

  logic [15:0] vstep [NF];
  logic [1:0]  prio  [NF];
  logic [31:0] ftag  [NF];
  logic [15:0] backlog [NF];

  ostate_e       st;
  logic [FW-1:0] cur;

  function automatic logic in_range(input flow_t f);
    return (32'(f) >= BASE) && (32'(f) < BASE + NF);
  endfunction

  // candidate selection
  logic          pick_any;
  logic [FW-1:0] pick;
  always_comb begin
    logic [NF-1:0] bl, el, cand;
    logic [31:0]   best_f, est;
    logic [1:0]    best_p;
    logic [1:0] top_p;
    top_p = '0;
    for (int i = 0; i < NF; i++)
      if (backlog[i] != 0 && conform[i] && prio[i] > top_p) top_p = prio[i];
    // strict priority first: only flows of the highest waiting priority compete
    for (int i = 0; i < NF; i++) begin
      bl[i] = (backlog[i] != 0) && conform[i] && (prio[i] == top_p);
      el[i] = bl[i] && (ftag[i] <= vtime);
    end
    cand     = (el != 0) ? el : bl;
    pick_any = 1'b0;
    pick     = '0;
    best_f   = '0;
    best_p   = '0;
    for (int i = 0; i < NF; i++) begin
      est = ((ftag[i] > vtime) ? ftag[i] : vtime) + 32'(LREF) * 32'(vstep[i]);
      if (cand[i] && (!pick_any || prio[i] > best_p || (prio[i] == best_p && est < best_f))) begin
        pick_any = 1'b1;
        pick     = FW'(i);
        best_f   = est;
        best_p   = prio[i];
      end
    end
  end

  // smallest finish tag among backlogged flows, for the virtual-time update
  logic        any_bl;
  logic [31:0] min_f;
  always_comb begin
    any_bl = 1'b0;
    min_f  = '0;
    for (int i = 0; i < NF; i++)
      if (backlog[i] != 0 && (!any_bl || ftag[i] < min_f)) begin
        any_bl = 1'b1;
        min_f  = ftag[i];
      end
  end

  assign req_valid = (st == O_REQ);
  assign req_flow  = flow_t'(BASE + 32'(cur));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= O_IDLE;
      cur   <= '0;
      vtime <= '0;
      for (int i = 0; i < NF; i++) begin
        vstep[i] <= 16'd256;
        prio[i]  <= '0;
        ftag[i]  <= '0;
        backlog[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NF; i++) begin
        logic inc, dec;
        inc = enq_valid && in_range(enq_flow) && (32'(enq_flow) - BASE == i);
        dec = deq_valid && in_range(deq_flow) && (32'(deq_flow) - BASE == i);
        if (inc && !dec) backlog[i] <= backlog[i] + 1'b1;
        else if (dec && !inc && backlog[i] != 0) backlog[i] <= backlog[i] - 1'b1;
      end
      if (cfg_we) begin
        vstep[cfg_flow] <= cfg_vstep;
        prio[cfg_flow]  <= cfg_prio;
      end
      unique case (st)
        O_IDLE: if (port_ready && pick_any) begin cur <= pick; st <= O_REQ; end
        O_REQ:  if (req_ready) st <= O_WAIT;
        O_WAIT: if (done_valid) begin
          ftag[cur] <= ((ftag[cur] > vtime) ? ftag[cur] : vtime) + 32'(done_len) * 32'(vstep[cur]);
          st        <= O_IDLE;
        end
        default: st <= O_IDLE;
      endcase
      if (st == O_IDLE && any_bl && min_f > vtime) vtime <= min_f;
    end
  end
endmodule
