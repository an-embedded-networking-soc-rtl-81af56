// hbce: Hash Based Classification Engine (exact match on {MAC address, VLAN id}).
//
// Stores MAC/VLAN rules and returns, for a key, the result word (a port or
// queue id) that the forwarding software uses. It serves destination lookups,
// source-MAC learning (a search followed by a write, the "double memory
// access" of learning) and deletion, which the control CPU uses to age
// entries out.
//
// How it works. The table is compacted by replacing the 24-bit vendor part
// (OUI) of each MAC address with a short index into a small vendor table, so a
// stored key is {VID, vendor index, 24-bit station part} instead of 60 bits.
// The compacted key is hashed to a table index; the entry and the next
// PROBES-1 entries (open addressing, wrapping) are read one per cycle, always
// all of them, so an entry can be deleted by clearing its valid bit without
// breaking a probe chain. A learn updates a matching entry or takes the first
// free probed slot. After reset the engine clears the valid bits, one entry per
// cycle (ENTRIES cycles), before it accepts a request.
//
// Interface: req_valid/req_ready with op, mac, vid, result; rsp_valid pulses
// once per request with hit (lookup/delete found the key, learn stored it) and
// the result word. Latency: PROBES+1 cycles from acceptance to response.
//
// The table size (16K entries) is read from the connection-memory figure;
// the vendor-id replacement is named in the paper but its form, the hash and
// the probing are this design's own.
module hbce #(
  parameter int unsigned ENTRIES = 16384,
  parameter int unsigned PROBES  = 4,
  parameter int unsigned VENDORS = 64,
  parameter int unsigned RES_W   = 16,
  localparam int unsigned IW = $clog2(ENTRIES),
  localparam int unsigned VW = $clog2(VENDORS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [1:0]       req_op,      // 0 lookup, 1 learn, 2 delete
  input  logic [47:0]      req_mac,
  input  logic [11:0]      req_vid,
  input  logic [RES_W-1:0] req_result,
  output logic             rsp_valid,
  output logic             rsp_hit,
  output logic [RES_W-1:0] rsp_result,
  output logic             init_done
);
  localparam logic [1:0] OP_LOOKUP = 2'd0, OP_LEARN = 2'd1, OP_DELETE = 2'd2;

  typedef struct packed {
    logic             valid;
    logic [11:0]      vid;
    logic [VW-1:0]    vidx;
    logic [23:0]      nic;
    logic [RES_W-1:0] result;
  } entry_t;

  typedef enum logic [1:0] {H_INIT, H_IDLE, H_PROBE, H_RESP} hstate_e;

  entry_t        tbl [ENTRIES];
  logic [23:0]   vend_oui [VENDORS];
  logic [VENDORS-1:0] vend_valid;

  hstate_e          st;
  logic [IW-1:0]    init_idx;
  logic [1:0]       op;
  logic [11:0]      vid;
  logic [VW-1:0]    vidx;
  logic [23:0]      nic;
  logic [RES_W-1:0] res;
  logic [IW-1:0]    base;
  logic [$clog2(PROBES+1)-1:0] pcnt;
  logic             found, free_seen;
  logic [IW-1:0]    found_idx, free_idx;
  logic             key_ok;     // vendor part known (or just allocated)

  // vendor table match for the incoming request
  logic          vmatch;
  logic [VW-1:0] vmatch_idx, vfree_idx;
  logic          vfree;
  always_comb begin
    vmatch = 1'b0; vmatch_idx = '0; vfree = 1'b0; vfree_idx = '0;
    for (int i = 0; i < VENDORS; i++) begin
      if (!vmatch && vend_valid[i] && vend_oui[i] == req_mac[47:24]) begin
        vmatch = 1'b1; vmatch_idx = VW'(i);
      end
      if (!vfree && !vend_valid[i]) begin
        vfree = 1'b1; vfree_idx = VW'(i);
      end
    end
  end

  function automatic logic [IW-1:0] hash(input logic [11:0] v, input logic [VW-1:0] x,
                                         input logic [23:0] n);
    logic [63:0] k;
    logic [IW-1:0] h;
    k = 64'({v, x, n});
    k = k ^ (k >> 17) ^ (k << 5);
    h = '0;
    for (int i = 0; i < 64; i += IW) h ^= IW'(k >> i);
    return h;
  endfunction

  logic [IW-1:0] pidx;
  entry_t        pent;
  assign pidx = base + IW'(pcnt);
  assign pent = tbl[pidx];

  assign req_ready = (st == H_IDLE);
  assign init_done = (st != H_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= H_INIT;
      init_idx   <= '0;
      vend_valid <= '0;
      rsp_valid  <= 1'b0;
      rsp_hit    <= 1'b0;
      rsp_result <= '0;
      op <= '0; vid <= '0; vidx <= '0; nic <= '0; res <= '0; base <= '0; pcnt <= '0;
      found <= 1'b0; free_seen <= 1'b0; found_idx <= '0; free_idx <= '0; key_ok <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (st)
        H_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == IW'(ENTRIES - 1)) st <= H_IDLE;
        end
        H_IDLE: if (req_valid) begin
          op  <= req_op;
          vid <= req_vid;
          nic <= req_mac[23:0];
          res <= req_result;
          pcnt <= '0; found <= 1'b0; free_seen <= 1'b0;
          if (vmatch) begin
            vidx   <= vmatch_idx;
            key_ok <= 1'b1;
            base   <= hash(req_vid, vmatch_idx, req_mac[23:0]);
          end else if (req_op == OP_LEARN && vfree) begin
            vend_valid[vfree_idx] <= 1'b1;
            vend_oui[vfree_idx]   <= req_mac[47:24];
            vidx   <= vfree_idx;
            key_ok <= 1'b1;
            base   <= hash(req_vid, vfree_idx, req_mac[23:0]);
          end else begin
            key_ok <= 1'b0;
          end
          st <= H_PROBE;
        end
        H_PROBE: begin
          if (!key_ok) begin
            st <= H_RESP;
          end else begin
            if (!found && pent.valid && pent.vid == vid && pent.vidx == vidx && pent.nic == nic) begin
              found <= 1'b1; found_idx <= pidx;
            end
            if (!free_seen && !pent.valid) begin
              free_seen <= 1'b1; free_idx <= pidx;
            end
            pcnt <= pcnt + 1'b1;
            if (pcnt == ($bits(pcnt))'(PROBES - 1)) st <= H_RESP;
          end
        end
        H_RESP: begin
          st        <= H_IDLE;
          rsp_valid <= 1'b1;
          rsp_hit   <= 1'b0;
          rsp_result <= '0;
          if (key_ok) begin
            unique case (op)
              OP_LOOKUP: begin
                rsp_hit    <= found;
                rsp_result <= tbl[found_idx].result;
              end
              OP_LEARN: begin
                rsp_hit    <= found | free_seen;
                rsp_result <= res;
              end
              OP_DELETE: begin
                rsp_hit    <= found;
                rsp_result <= tbl[found_idx].result;
              end
              default: ;
            endcase
          end
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  // table writes: initial clear, learn, delete
  always_ff @(posedge clk) begin
    if (st == H_INIT) begin
      tbl[init_idx].valid <= 1'b0;
    end else if (st == H_RESP && key_ok) begin
      if (op == OP_LEARN && (found || free_seen))
        tbl[found ? found_idx : free_idx] <= '{valid: 1'b1, vid: vid, vidx: vidx, nic: nic, result: res};
      else if (op == OP_DELETE && found)
        tbl[found_idx].valid <= 1'b0;
    end
  end
endmodule
