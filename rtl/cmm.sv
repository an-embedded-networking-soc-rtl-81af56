// cmm: Connection Memory Manager.
//
// Owns the connection memory, in which the forwarding state of the bridge
// lives, partitioned as in the paper's connection-memory figure:
//   * the HBCE table, searched by {MAC, VID} and returning a port/queue id;
//   * the VLAN config memory, indexed by VID, giving the VPLS index;
//   * the VLAN context memory, indexed by VPLS index, holding the protocol
//     (NULL or MPLS), two output queue ids and the 11-byte L2 tunnel header.
// CMM_CLASSIFY returns all three for one packet in a single request, so a
// processing unit gets the forwarding decision and the VLAN's context with one
// bus transaction.
//
// Interface: req_valid/req_ready with a cmm_req_t; rsp_valid pulses once per
// request with a cmm_rsp_t. VLAN memory reads and writes answer one cycle after
// acceptance; anything that uses the HBCE answers when the HBCE does
// (PROBES+2 cycles). After reset the block clears its valid bits and holds
// req_ready and init_done low until done (HBCE_ENTRIES cycles).
//
// The memory partitioning and the context fields are the paper's; the widths
// of the indices and the single-request classify operation are this design's.
module cmm
  import gf_pkg::*;
#(
  parameter int unsigned HBCE_ENTRIES = 16384,
  parameter int unsigned HBCE_PROBES  = 4,
  parameter int unsigned VCTX_ENTRIES = 2048
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  cmm_req_t req,
  output logic     rsp_valid,
  output cmm_rsp_t rsp,
  output logic     init_done
);
  localparam int unsigned CW = $clog2(VCTX_ENTRIES);

  typedef struct packed {
    logic              valid;
    logic [VIDX_W-1:0] vidx;
  } vcfg_t;

  typedef enum logic [1:0] {C_IDLE, C_HBCE, C_WAIT} cstate_e;

  vcfg_t  vcfg [4096];
  vctx_t  vctx [VCTX_ENTRIES];

  cstate_e   st;
  cmm_req_t  r;
  logic [11:0] init_idx;
  logic        vinit_done;

  logic hb_req_valid, hb_req_ready, hb_rsp_valid, hb_rsp_hit, hb_init_done;
  logic [15:0] hb_rsp_result;
  logic [1:0]  hb_op;

  always_comb begin
    unique case (r.op)
      CMM_LEARN:  hb_op = 2'd1;
      CMM_DELETE: hb_op = 2'd2;
      default:    hb_op = 2'd0;
    endcase
  end

  hbce #(.ENTRIES(HBCE_ENTRIES), .PROBES(HBCE_PROBES), .RES_W(16)) u_hbce (
    .clk, .rst_n,
    .req_valid (hb_req_valid),
    .req_ready (hb_req_ready),
    .req_op    (hb_op),
    .req_mac   (r.mac),
    .req_vid   (r.vid),
    .req_result(r.result),
    .rsp_valid (hb_rsp_valid),
    .rsp_hit   (hb_rsp_hit),
    .rsp_result(hb_rsp_result),
    .init_done (hb_init_done)
  );

  assign req_ready    = (st == C_IDLE) && vinit_done && hb_init_done;
  assign init_done    = vinit_done && hb_init_done;
  assign hb_req_valid = (st == C_HBCE);

  function automatic logic uses_hbce(input cmm_op_e o);
    return o inside {CMM_LOOKUP, CMM_LEARN, CMM_DELETE, CMM_CLASSIFY};
  endfunction

  vcfg_t cur_cfg;
  assign cur_cfg = vcfg[r.vid];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= C_IDLE;
      r          <= '0;
      init_idx   <= '0;
      vinit_done <= 1'b0;
      rsp_valid  <= 1'b0;
      rsp        <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (!vinit_done) begin
        init_idx <= init_idx + 1'b1;
        if (init_idx == 12'hFFF) vinit_done <= 1'b1;
      end
      unique case (st)
        C_IDLE: if (req_valid && req_ready) begin
          r <= req;
          if (uses_hbce(req.op)) begin
            st <= C_HBCE;
          end else begin
            rsp_valid <= 1'b1;
            rsp       <= '0;
            unique case (req.op)
              CMM_VCFG_RD: begin
                rsp.vlan_ok <= vcfg[req.vid].valid;
                rsp.vidx    <= vcfg[req.vid].vidx;
              end
              CMM_VCTX_RD: rsp.ctx <= vctx[CW'(req.vidx)];
              default: ;
            endcase
          end
        end
        C_HBCE: if (hb_req_ready) st <= C_WAIT;
        C_WAIT: if (hb_rsp_valid) begin
          st         <= C_IDLE;
          rsp_valid  <= 1'b1;
          rsp.hit    <= hb_rsp_hit;
          rsp.result <= hb_rsp_result;
          rsp.vlan_ok <= (r.op == CMM_CLASSIFY) && cur_cfg.valid;
          rsp.vidx    <= (r.op == CMM_CLASSIFY) ? cur_cfg.vidx : '0;
          rsp.ctx     <= (r.op == CMM_CLASSIFY) ? vctx[CW'(cur_cfg.vidx)] : '0;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  // VLAN memory writes
  always_ff @(posedge clk) begin
    if (!vinit_done)
      vcfg[init_idx] <= '0;
    else if (st == C_IDLE && req_valid && req_ready && req.op == CMM_VCFG_WR)
      vcfg[req.vid] <= '{valid: 1'b1, vidx: req.vidx};
    if (st == C_IDLE && req_valid && req_ready && req.op == CMM_VCTX_WR)
      vctx[CW'(req.vidx)] <= req.ctx;
  end
endmodule
