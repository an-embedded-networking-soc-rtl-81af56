// gigaflow_top: GigaFlow network processor core.
//
// A network processor for Ethernet access concentrators (Ethernet bridging
// over MPLS). Packets are stored once by the Data Memory Manager (DMM) and
// moved between per-flow queues by commands; software on the packet
// processing units (PPUs) only sees headers, which reach it through one
// DP-RAM per PPU. Hardware does the data copying, the MAC/VLAN
// classification, the choice of which input packet to process next and
// which output flow to send next.
//
// Wiring, following the paper's block diagram:
//   network ports  -> DMM            frames stored, queued on the port's input
//                                     flow; TSC told of the arrival
//   TSC            -> DMM (FETCH)    header copied to a free PPU's DP-RAM,
//                                     PPU told (task_valid)
//   PPUs           -> DMM, CMM       commands through round-robin arbiters
//                                     (the paper's shared bus), header data
//                                     through their DP-RAM port B
//   control CPU    -> CMM            table maintenance (aging); scheduler
//                                     and port configuration through cfg ports
//   DMM queue events -> OSC per port, TSH per port -> DMM transmit
//                                     -> MAC transmit buffer -> GMII/MII
// Ports: NGE Gigabit Ethernet (GMII) ports are DMM ports 0..NGE-1, the Fast
// Ethernet (MII) port is DMM port NGE and the ATM port (UTOPIA cells, AAL5,
// one virtual circuit ATM_VPI/ATM_VCI) is DMM port NGE+1. Output flow j of
// port p is global flow OUT_BASE + p*OUT_FLOWS + j. The PPUs, the control
// CPU, the bus itself and the security engine are outside this RTL; their
// signals are ports here.
//
// The block set and their connections are the paper's; the port count (two
// GMII, one MII and one UTOPIA port as drawn), the flow numbering, the
// arbiters standing for the bus and the configuration ports are this
// design's.
module gigaflow_top
  import gf_pkg::*;
#(
  parameter int unsigned NGE        = 2,
  parameter int unsigned NPPU       = 4,
  parameter int unsigned NFLOWS     = 32768,
  parameter int unsigned NSEG       = 4096,
  parameter int unsigned NPKT       = 1024,
  parameter int unsigned NDESC      = 2048,
  parameter int unsigned OUT_FLOWS  = 16,
  parameter int unsigned OUT_BASE   = 1024,
  parameter int unsigned HBCE_ENTRIES = 16384,
  parameter int unsigned MAC_BUF_WORDS = 1024,
  parameter int unsigned TX_RESERVE = 400,
  parameter logic [7:0]  ATM_VPI    = 8'd0,
  parameter logic [15:0] ATM_VCI    = 16'd32,
  localparam int unsigned NPORT = NGE + 2,
  localparam int unsigned PTW   = $clog2(NPORT),
  localparam int unsigned OFW   = $clog2(OUT_FLOWS),
  localparam int unsigned MBW   = $clog2(MAC_BUF_WORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // Gigabit Ethernet ports
  input  logic [NGE-1:0]      gmii_rx_dv,
  input  logic [NGE-1:0]      gmii_rx_er,
  input  logic [7:0]          gmii_rxd [NGE],
  output logic [NGE-1:0]      gmii_tx_en,
  output logic [NGE-1:0]      gmii_tx_er,
  output logic [7:0]          gmii_txd [NGE],
  // Fast Ethernet port (MII clock as a clock enable)
  input  logic                mii_ce,
  input  logic                mii_rx_dv,
  input  logic                mii_rx_er,
  input  logic [3:0]          mii_rxd,
  output logic                mii_tx_en,
  output logic [3:0]          mii_txd,
  // ATM port (UTOPIA-style cell interface)
  input  logic                atm_rx_clav,
  output logic                atm_rx_enb_n,
  input  logic                atm_rx_soc,
  input  logic [7:0]          atm_rx_data,
  input  logic                atm_tx_clav,
  output logic                atm_tx_enb_n,
  output logic                atm_tx_soc,
  output logic [7:0]          atm_tx_data,
  // packet processing units: DMM commands
  input  logic [NPPU-1:0]     ppu_cmd_valid,
  output logic [NPPU-1:0]     ppu_cmd_ready,
  input  dmm_cmd_t            ppu_cmd [NPPU],
  output logic [NPPU-1:0]     ppu_rsp_valid,
  output dmm_rsp_t            ppu_rsp,
  // packet processing units: CMM requests
  input  logic [NPPU-1:0]     ppu_cmm_valid,
  output logic [NPPU-1:0]     ppu_cmm_ready,
  input  cmm_req_t            ppu_cmm_req [NPPU],
  output logic [NPPU-1:0]     ppu_cmm_rsp_valid,
  output cmm_rsp_t            ppu_cmm_rsp,
  // packet processing units: DP-RAM port B
  input  logic [NPPU-1:0]     ppu_dp_we,
  input  logic [DPA_W-1:0]    ppu_dp_addr [NPPU],
  input  logic [31:0]         ppu_dp_wdata [NPPU],
  output logic [31:0]         ppu_dp_rdata [NPPU],
  // packet processing units: tasks from the task scheduler
  output logic [NPPU-1:0]     task_valid,
  output flow_t               task_flow,
  output pktid_t              task_pkt,
  output len_t                task_len,
  output logic                task_slot,
  input  logic [NPPU-1:0]     ppu_done,
  // control CPU: CMM requests (aging, table set-up)
  input  logic                cpu_cmm_valid,
  output logic                cpu_cmm_ready,
  input  cmm_req_t            cpu_cmm_req,
  output logic                cpu_cmm_rsp_valid,
  // control CPU: configuration
  input  logic                cfg_port_we,      // input flow / priority of a port
  input  logic [PTW-1:0]      cfg_port,
  input  flow_t               cfg_in_flow,
  input  logic [1:0]          cfg_in_prio,
  input  logic                cfg_tsc_we,       // task scheduler weights
  input  logic [1:0]          cfg_tsc_prio,
  input  logic [3:0]          cfg_tsc_weight,
  input  logic                cfg_out_we,       // output flow: scheduler and shaper
  input  logic [PTW-1:0]      cfg_out_port,
  input  logic [OFW-1:0]      cfg_out_flow,
  input  logic [15:0]         cfg_out_vstep,
  input  logic [1:0]          cfg_out_prio,
  input  logic [15:0]         cfg_out_rate,
  input  logic [15:0]         cfg_out_depth,
  // status
  output logic                ready,
  output logic [15:0]         mac_rx_ok   [NPORT],
  output logic [15:0]         mac_rx_drop [NPORT],
  output logic [15:0]         mac_tx_sent [NPORT],
  output logic [15:0]         atm_cells_dropped,
  output logic [15:0]         dmm_drops,
  output logic [15:0]         tsc_overflow
);
  // ------------------------------------------------------------ MACs
  localparam int unsigned NETH = NGE + 1;  // Ethernet ports, then the ATM port
  logic [NETH-1:0]   rx_ce, rx_dv, rx_er, tx_ce, tx_en_i;
  logic [7:0]        rxd_i [NETH];
  logic [7:0]        txd_i [NETH];
  logic [NPORT-1:0]  frm_avail, frm_pop;
  len_t              frm_len [NPORT];
  logic [MBW-1:0]    rx_idx;
  logic [31:0]       rx_word [NPORT];
  logic [NPORT-1:0]  tx_push;
  logic [31:0]       tx_data;
  logic [2:0]        tx_nb;
  logic              tx_last;
  logic [MBW:0]      tx_space [NPORT];
  logic [NETH-1:0]   tx_er_i;

  for (genvar g = 0; g < NGE; g++) begin : g_ge
    assign rx_ce[g]   = 1'b1;
    assign tx_ce[g]   = 1'b1;
    assign rx_dv[g]   = gmii_rx_dv[g];
    assign rx_er[g]   = gmii_rx_er[g];
    assign rxd_i[g]   = gmii_rxd[g];
    assign gmii_tx_en[g] = tx_en_i[g];
    assign gmii_tx_er[g] = tx_er_i[g];
    assign gmii_txd[g]   = txd_i[g];
  end

  mii_adapt u_mii (
    .clk, .rst_n, .mii_ce,
    .mii_rx_dv, .mii_rx_er, .mii_rxd,
    .rx_ce (rx_ce[NGE]), .rx_dv (rx_dv[NGE]), .rx_er (rx_er[NGE]), .rxd (rxd_i[NGE]),
    .tx_ce (tx_ce[NGE]), .tx_en (tx_en_i[NGE]), .txd (txd_i[NGE]),
    .mii_tx_en, .mii_txd
  );

  for (genvar p = 0; p < NETH; p++) begin : g_mac
    gmii_rx #(.BUF_WORDS(MAC_BUF_WORDS)) u_rx (
      .clk, .rst_n, .ce(rx_ce[p]), .rx_dv(rx_dv[p]), .rx_er(rx_er[p]), .rxd(rxd_i[p]),
      .frm_avail(frm_avail[p]), .frm_len(frm_len[p]), .rd_idx(rx_idx), .rd_data(rx_word[p]),
      .frm_pop(frm_pop[p]), .frames_ok(mac_rx_ok[p]), .drops(mac_rx_drop[p])
    );
    gmii_tx #(.BUF_WORDS(MAC_BUF_WORDS)) u_tx (
      .clk, .rst_n, .ce(tx_ce[p]), .push_valid(tx_push[p]), .push_data(tx_data),
      .push_nb(tx_nb), .push_last(tx_last), .space(tx_space[p]),
      .tx_en(tx_en_i[p]), .tx_er(tx_er_i[p]), .txd(txd_i[p]), .sent(mac_tx_sent[p])
    );
  end

  aal5_rx #(.BUF_WORDS(MAC_BUF_WORDS), .VPI(ATM_VPI), .VCI(ATM_VCI)) u_atm_rx (
    .clk, .rst_n, .rx_clav(atm_rx_clav), .rx_enb_n(atm_rx_enb_n), .rx_soc(atm_rx_soc),
    .rx_data(atm_rx_data),
    .frm_avail(frm_avail[NETH]), .frm_len(frm_len[NETH]), .rd_idx(rx_idx),
    .rd_data(rx_word[NETH]), .frm_pop(frm_pop[NETH]), .frames_ok(mac_rx_ok[NETH]),
    .drops(mac_rx_drop[NETH]), .cells_dropped(atm_cells_dropped)
  );
  aal5_tx #(.BUF_WORDS(MAC_BUF_WORDS), .VPI(ATM_VPI), .VCI(ATM_VCI)) u_atm_tx (
    .clk, .rst_n, .push_valid(tx_push[NETH]), .push_data(tx_data), .push_nb(tx_nb),
    .push_last(tx_last), .space(tx_space[NETH]),
    .tx_clav(atm_tx_clav), .tx_enb_n(atm_tx_enb_n), .tx_soc(atm_tx_soc),
    .tx_data(atm_tx_data), .sent(mac_tx_sent[NETH])
  );

  // ------------------------------------------------------------ DMM command bus
  localparam int unsigned NM = NPPU + 1;   // master 0: TSC, 1..NPPU: PPUs
  logic [NM-1:0] m_valid, m_ready, m_rsp_valid;
  dmm_cmd_t      m_req [NM];
  dmm_rsp_t      m_rsp;
  logic          d_cmd_valid, d_cmd_ready, d_rsp_valid;
  dmm_cmd_t      d_cmd;
  dmm_rsp_t      d_rsp;

  logic     tsc_cmd_valid;
  dmm_cmd_t tsc_cmd;
  assign m_valid[0] = tsc_cmd_valid;
  assign m_req[0]   = tsc_cmd;
  for (genvar k = 0; k < NPPU; k++) begin : g_pcmd
    assign m_valid[k+1]  = ppu_cmd_valid[k];
    assign m_req[k+1]    = ppu_cmd[k];
    assign ppu_cmd_ready[k] = m_ready[k+1];
    assign ppu_rsp_valid[k] = m_rsp_valid[k+1];
  end
  assign ppu_rsp = m_rsp;

  cmd_arb #(.N(NM), .REQ_T(dmm_cmd_t), .RSP_T(dmm_rsp_t)) u_dmm_bus (
    .clk, .rst_n, .m_valid, .m_ready, .m_req, .m_rsp_valid, .m_rsp,
    .s_valid(d_cmd_valid), .s_ready(d_cmd_ready), .s_req(d_cmd),
    .s_rsp_valid(d_rsp_valid), .s_rsp(d_rsp)
  );

  // ------------------------------------------------------------ DP-RAMs
  logic [NPPU-1:0]  dp_we;
  logic [DPA_W-1:0] dp_addr;
  logic [31:0]      dp_wdata;
  logic [31:0]      dp_rdata [NPPU];
  for (genvar k = 0; k < NPPU; k++) begin : g_dp
    dpram #(.WORDS(1 << DPA_W), .DW(32)) u_dp (
      .clk, .a_we(dp_we[k]), .a_addr(dp_addr), .a_wdata(dp_wdata), .a_rdata(dp_rdata[k]),
      .b_we(ppu_dp_we[k]), .b_addr(ppu_dp_addr[k]), .b_wdata(ppu_dp_wdata[k]),
      .b_rdata(ppu_dp_rdata[k])
    );
  end

  // ------------------------------------------------------------ DMM
  logic          arr_valid, enq_valid, deq_valid, dmm_init_done;
  flow_t         arr_flow;
  logic [1:0]    arr_prio;
  q_evt_t        enq_evt, deq_evt;
  logic          tx_req_valid, tx_req_ready, tx_done_valid;
  flow_t         tx_req_flow;
  logic [PTW-1:0] tx_req_port, tx_done_port;
  len_t          tx_done_len;

  dmm #(.NFLOWS(NFLOWS), .NSEG(NSEG), .SEG_WORDS(16), .NPKT(NPKT), .NDESC(NDESC),
        .NPORT(NPORT), .NPPU(NPPU), .RX_AW(MBW)) u_dmm (
    .clk, .rst_n, .init_done(dmm_init_done),
    .cmd_valid(d_cmd_valid), .cmd_ready(d_cmd_ready), .cmd(d_cmd),
    .rsp_valid(d_rsp_valid), .rsp(d_rsp),
    .rx_avail(frm_avail), .rx_len(frm_len), .rx_idx, .rx_data(rx_word), .rx_pop(frm_pop),
    .cfg_we(cfg_port_we), .cfg_port, .cfg_flow(cfg_in_flow), .cfg_prio(cfg_in_prio),
    .arr_valid, .arr_flow, .arr_prio,
    .enq_valid, .enq_evt, .deq_valid, .deq_evt,
    .tx_req_valid, .tx_req_ready, .tx_req_flow, .tx_req_port,
    .tx_push, .tx_data, .tx_nb, .tx_last,
    .tx_done_valid, .tx_done_port, .tx_done_len,
    .dp_we, .dp_addr, .dp_wdata, .dp_rdata,
    .rx_drops(dmm_drops)
  );

  // ------------------------------------------------------------ task scheduler
  // Each stored packet has at most one pending arrival notice, so FIFOs of
  // NPKT entries per priority can never overflow.
  tsc #(.NPPU(NPPU), .NPRIO(4), .DEPTH(NPKT), .SLOTS(2), .SLOT_WORDS((1 << DPA_W) / 2),
        .HDR_BYTES(64)) u_tsc (
    .clk, .rst_n,
    .arr_valid, .arr_flow, .arr_prio,
    .cfg_we(cfg_tsc_we), .cfg_prio(cfg_tsc_prio), .cfg_weight(cfg_tsc_weight),
    .cmd_valid(tsc_cmd_valid), .cmd_ready(m_ready[0]), .cmd(tsc_cmd),
    .rsp_valid(m_rsp_valid[0]), .rsp(m_rsp),
    .ppu_done, .task_valid, .task_flow, .task_pkt, .task_len, .task_slot,
    .ovf(tsc_overflow)
  );

  // ------------------------------------------------------------ CMM and its bus
  localparam int unsigned NC = NPPU + 1;   // masters 0..NPPU-1: PPUs, NPPU: control CPU
  logic [NC-1:0] c_valid, c_ready, c_rsp_valid;
  cmm_req_t      c_req [NC];
  cmm_rsp_t      c_rsp_bus, cm_rsp;
  logic          cm_valid, cm_ready, cm_rsp_valid, cmm_init_done;
  cmm_req_t      cm_req;
  for (genvar k = 0; k < NPPU; k++) begin : g_pcmm
    assign c_valid[k] = ppu_cmm_valid[k];
    assign c_req[k]   = ppu_cmm_req[k];
    assign ppu_cmm_ready[k]     = c_ready[k];
    assign ppu_cmm_rsp_valid[k] = c_rsp_valid[k];
  end
  assign c_valid[NPPU]     = cpu_cmm_valid;
  assign c_req[NPPU]       = cpu_cmm_req;
  assign cpu_cmm_ready     = c_ready[NPPU];
  assign cpu_cmm_rsp_valid = c_rsp_valid[NPPU];
  assign ppu_cmm_rsp       = c_rsp_bus;

  cmd_arb #(.N(NC), .REQ_T(cmm_req_t), .RSP_T(cmm_rsp_t)) u_cmm_bus (
    .clk, .rst_n, .m_valid(c_valid), .m_ready(c_ready), .m_req(c_req),
    .m_rsp_valid(c_rsp_valid), .m_rsp(c_rsp_bus),
    .s_valid(cm_valid), .s_ready(cm_ready), .s_req(cm_req),
    .s_rsp_valid(cm_rsp_valid), .s_rsp(cm_rsp)
  );

  cmm #(.HBCE_ENTRIES(HBCE_ENTRIES), .HBCE_PROBES(4), .VCTX_ENTRIES(2048)) u_cmm (
    .clk, .rst_n, .req_valid(cm_valid), .req_ready(cm_ready), .req(cm_req),
    .rsp_valid(cm_rsp_valid), .rsp(cm_rsp), .init_done(cmm_init_done)
  );

  // ------------------------------------------------------------ output side
  logic [NPORT-1:0] o_req_valid, o_req_ready;
  flow_t            o_req_flow [NPORT];
  flow_t            inflight_flow [NPORT];
  logic [PTW-1:0]   tx_rr;

  for (genvar p = 0; p < NPORT; p++) begin : g_out
    logic [OUT_FLOWS-1:0] conform;
    logic                 done_p;
    logic [31:0]          vtime;
    assign done_p = tx_done_valid && (tx_done_port == PTW'(p));

    tsh #(.NF(OUT_FLOWS)) u_tsh (
      .clk, .rst_n,
      .cfg_we(cfg_out_we && cfg_out_port == PTW'(p)), .cfg_flow(cfg_out_flow),
      .cfg_rate(cfg_out_rate), .cfg_depth(cfg_out_depth),
      .done_valid(done_p), .done_flow(OFW'(inflight_flow[p] - flow_t'(OUT_BASE + p * OUT_FLOWS))),
      .done_len(tx_done_len), .conform
    );

    osc #(.NF(OUT_FLOWS), .BASE(OUT_BASE + p * OUT_FLOWS)) u_osc (
      .clk, .rst_n,
      .cfg_we(cfg_out_we && cfg_out_port == PTW'(p)), .cfg_flow(cfg_out_flow),
      .cfg_vstep(cfg_out_vstep), .cfg_prio(cfg_out_prio),
      .enq_valid, .enq_flow(enq_evt.flow), .deq_valid, .deq_flow(deq_evt.flow),
      .conform, .port_ready(tx_space[p] >= (MBW+1)'(TX_RESERVE)),
      .req_valid(o_req_valid[p]), .req_ready(o_req_ready[p]), .req_flow(o_req_flow[p]),
      .done_valid(done_p), .done_len(tx_done_len), .vtime
    );
  end

  // round-robin among the ports' schedulers for the DMM transmit engine
  logic           t_any;
  logic [PTW-1:0] t_pick;
  always_comb begin
    t_any = 1'b0; t_pick = '0;
    for (int j = 1; j <= NPORT; j++) begin
      int unsigned q;
      q = (int'(tx_rr) + j) % NPORT;
      if (!t_any && o_req_valid[q]) begin t_any = 1'b1; t_pick = PTW'(q); end
    end
  end
  assign tx_req_valid = t_any;
  assign tx_req_flow  = o_req_flow[t_pick];
  assign tx_req_port  = t_pick;
  always_comb begin
    o_req_ready = '0;
    o_req_ready[t_pick] = t_any && tx_req_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_rr <= '0;
      for (int p = 0; p < NPORT; p++) inflight_flow[p] <= '0;
    end else if (t_any && tx_req_ready) begin
      tx_rr <= t_pick;
      inflight_flow[t_pick] <= o_req_flow[t_pick];
    end
  end

  assign ready = dmm_init_done && cmm_init_done;
endmodule
