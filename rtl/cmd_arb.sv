// cmd_arb: round-robin command arbiter with response return.
//
// In the paper the task scheduler and the processing units send their
// commands to the Data Memory Manager over a shared on-chip bus. This block
// stands for that command path: N masters each offer a request with a
// valid/ready handshake; one at a time is forwarded to the single target, and
// the target's response (one-cycle rsp_valid pulse) is steered back to the
// master that issued the request. One command is in flight at a time, the way
// a simple non-burst bus serves one transfer at a time. The grant rotates
// round-robin, starting after the master served last.
//
// Timing: request accepted two cycles after it is first seen at the earliest
// (grant cycle, issue cycle); the response reaches the master in the cycle the
// target returns it. A master must hold its request stable while valid is
// high and ready is low.
module cmd_arb #(
  parameter int unsigned N   = 5,
  parameter type         REQ_T = gf_pkg::dmm_cmd_t,
  parameter type         RSP_T = gf_pkg::dmm_rsp_t
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  m_valid,
  output logic [N-1:0]  m_ready,
  input  REQ_T          m_req [N],
  output logic [N-1:0]  m_rsp_valid,
  output RSP_T          m_rsp,
  output logic          s_valid,
  input  logic          s_ready,
  output REQ_T          s_req,
  input  logic          s_rsp_valid,
  input  RSP_T          s_rsp
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;
  typedef enum logic [1:0] {A_IDLE, A_ISSUE, A_WAIT} astate_e;

  astate_e       st;
  logic [SW-1:0] sel, last;
  logic [SW-1:0] gnt;
  logic          gnt_any;

  // next requester after `last`, round-robin
  always_comb begin
    gnt     = '0;
    gnt_any = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!gnt_any && m_valid[idx]) begin
        gnt     = SW'(idx);
        gnt_any = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= A_IDLE;
      sel  <= '0;
      last <= SW'(N - 1);
    end else begin
      unique case (st)
        A_IDLE:  if (gnt_any) begin sel <= gnt; st <= A_ISSUE; end
        A_ISSUE: if (s_ready) st <= A_WAIT;
        A_WAIT:  if (s_rsp_valid) begin last <= sel; st <= A_IDLE; end
        default: st <= A_IDLE;
      endcase
    end
  end

  always_comb begin
    s_valid     = (st == A_ISSUE);
    s_req       = m_req[sel];
    m_ready     = '0;
    m_rsp_valid = '0;
    m_rsp       = s_rsp;
    if (st == A_ISSUE) m_ready[sel] = s_ready;
    if (st == A_WAIT)  m_rsp_valid[sel] = s_rsp_valid;
  end

  // the granted master must not withdraw its request before it is accepted
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           st == A_ISSUE |-> m_valid[sel]);
endmodule
