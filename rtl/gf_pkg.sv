// gf_pkg: types and constants shared by the blocks of the GigaFlow network
// processor core.
//
// The flow-id width follows the 32K per-flow queues of the Data Memory Manager
// (DMM). The DMM command set, its command and response records, the event
// records the DMM sends to the schedulers, the Ethernet CRC-32 used by the
// MACs and the ATM checks used by the AAL5 port (AAL5 CRC-32, cell HEC) are
// defined here. The paper names "enqueue" and "dequeue" and says there
// are further commands without listing them; the other opcodes below are this
// design's own choice of what the packet-processing software needs.
package gf_pkg;

  localparam int unsigned FLOW_W  = 15;          // 32K flows
  localparam int unsigned PKTID_W = 16;          // packet-id field width in commands
  localparam int unsigned PPU_W   = 3;           // up to 8 processing units
  localparam int unsigned DPA_W   = 9;           // 512-word DP-RAM per processing unit
  localparam int unsigned LEN_W   = 16;          // packet length in bytes

  typedef logic [FLOW_W-1:0]  flow_t;
  typedef logic [PKTID_W-1:0] pktid_t;
  typedef logic [LEN_W-1:0]   len_t;

  // DMM commands (issued by the task scheduler and the processing units)
  typedef enum logic [3:0] {
    DMM_NOP       = 4'd0,
    DMM_ENQUEUE   = 4'd1,   // append packet `pkt` to queue `flow` (adds a reference)
    DMM_DEQUEUE   = 4'd2,   // remove head of `flow`, return its packet id (caller owns the reference)
    DMM_RELEASE   = 4'd3,   // drop one reference of `pkt`; storage freed at zero
    DMM_MOVE      = 4'd4,   // head of `flow` moves to the tail of `dst` (no data copy)
    DMM_COPY      = 4'd5,   // head of `flow` is also appended to `dst` (flooding, no data copy)
    DMM_READ_HDR  = 4'd6,   // copy first `nbytes` of `pkt` into DP-RAM `ppu` at word `dp_base`
    DMM_WRITE_HDR = 4'd7,   // replace first segment of `pkt` by `nbytes` taken from DP-RAM
    DMM_FETCH     = 4'd8,   // DEQUEUE + READ_HDR in one command (used by the task scheduler)
    DMM_QLEN      = 4'd9,   // return number of packets in `flow`
    DMM_PKT_LEN   = 4'd10   // return length of `pkt`
  } dmm_op_e;

  typedef struct packed {
    dmm_op_e                op;
    flow_t                  flow;
    flow_t                  dst;
    pktid_t                 pkt;
    logic [PPU_W-1:0]       ppu;
    logic [DPA_W-1:0]       dp_base;
    logic [10:0]            nbytes;
  } dmm_cmd_t;

  typedef struct packed {
    logic        ok;        // command succeeded
    logic [31:0] data;      // {len, pkt} for DEQUEUE/FETCH, count or length otherwise
  } dmm_rsp_t;

  // Event sent by the DMM whenever a packet joins or leaves a queue
  typedef struct packed {
    flow_t flow;
    len_t  len;
  } q_evt_t;


  // Connection memory (CMM) requests, issued by the processing units and the control CPU
  typedef enum logic [2:0] {
    CMM_LOOKUP   = 3'd0,   // HBCE search {mac, vid}
    CMM_LEARN    = 3'd1,   // HBCE search and write {mac, vid} -> result
    CMM_DELETE   = 3'd2,   // HBCE delete (aging by the control CPU)
    CMM_VCFG_WR  = 3'd3,   // VLAN config memory: vid -> VPLS index
    CMM_VCFG_RD  = 3'd4,
    CMM_VCTX_WR  = 3'd5,   // VLAN context memory, indexed by VPLS index
    CMM_VCTX_RD  = 3'd6,
    CMM_CLASSIFY = 3'd7    // HBCE lookup + VLAN config + VLAN context in one request
  } cmm_op_e;

  // one VLAN context record, fields as printed in the connection-memory figure
  typedef struct packed {
    logic [3:0]  proto;       // 0 NULL, 1 MPLS
    logic [15:0] out_q0;      // output queue
    logic [15:0] out_q1;      // second output queue
    logic [87:0] l2_hdr;      // 11-byte L2 tunnel header
  } vctx_t;

  localparam int unsigned VIDX_W = 11;   // VPLS index: 2K VLAN contexts

  typedef struct packed {
    cmm_op_e             op;
    logic [47:0]         mac;
    logic [11:0]         vid;
    logic [15:0]         result;
    logic [VIDX_W-1:0]   vidx;
    vctx_t               ctx;
  } cmm_req_t;

  typedef struct packed {
    logic                hit;      // HBCE: key found / stored
    logic [15:0]         result;   // HBCE result (port / queue id)
    logic                vlan_ok;  // VLAN config entry valid
    logic [VIDX_W-1:0]   vidx;
    vctx_t               ctx;
  } cmm_rsp_t;

  // Ethernet FCS: reflected CRC-32, polynomial 0x04C11DB7, one byte per call
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'h0, d};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

  // AAL5 CPCS-PDU CRC-32 (ITU-T I.363.5): polynomial 0x04C11DB7, most
  // significant bit first, register preset to all ones, complement sent most
  // significant byte first; over a whole PDU including its CRC field the
  // register ends at 0xC704DD7B.
  function automatic logic [31:0] crc32_msb_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {d, 24'h0};
    for (int i = 0; i < 8; i++)
      c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    return c;
  endfunction

  // ATM cell header error control (ITU-T I.432): CRC-8 x^8+x^2+x+1 over the
  // first four header bytes, XORed with the coset 0x55.
  function automatic logic [7:0] atm_hec(input logic [31:0] hdr);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 31; i >= 0; i--)
      c = (c[7] ^ hdr[i]) ? ((c << 1) ^ 8'h07) : (c << 1);
    return c ^ 8'h55;
  endfunction

endpackage
