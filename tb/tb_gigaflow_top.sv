// tb_gigaflow_top: end-to-end test of the GigaFlow core at its default sizes.
//
// Around the core: frame generators and line monitors on the two GMII ports
// and the MII port, a control CPU that sets up the VLAN tables, learns one
// station and configures schedulers and shapers, and four processing-unit
// models running the bridging software: on each task they read the header
// from their DP-RAM, learn the source MAC, classify {destination MAC, VLAN}
// in the CMM, encapsulate (VLAN 20: tunnel header + MPLS label written back
// with WRITE_HDR) or leave the frame as is (VLAN 10), queue it on one output
// flow, or on every other port for an unknown destination (flooding, one
// stored copy), then release it.
//
// Port 0 (GMII) holds station A, port 1 (GMII) is the uplink with station B,
// port 2 (MII) holds station C, port 3 (ATM, AAL5 cells) holds station D.
// Phase 1: A->B on VLAN 10 and 20, C->unknown (flooded), two frames with a
// bad FCS. Phase 2: B->A, B->C and D->A (over ATM), then B->D, whose
// addresses only the processing units' learning can have placed.
// Every frame leaving a port is checked, FCS or AAL5 HEC and CRC included,
// against the frames expected there; and every mechanism is counted and must
// occur: reception on GMII, MII and ATM, FCS drop, dispatch to all four PPUs,
// header prefetch into the second DP-RAM buffer while a PPU is busy, header
// rewrite, flooding, learned forwarding, shaping holding a flow back, two
// output flows sharing a port, transmission on MII and on ATM.
module tb_gigaflow_top;
  import gf_pkg::*;
  localparam int NGE = 2, NPPU = 4, NPORT = 4, OUT_BASE = 1024, OUT_FLOWS = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- DUT
  logic [NGE-1:0]   gmii_rx_dv, gmii_rx_er, gmii_tx_en, gmii_tx_er;
  logic [7:0]       gmii_rxd [NGE];
  logic [7:0]       gmii_txd [NGE];
  logic             mii_ce, mii_rx_dv, mii_rx_er, mii_tx_en;
  logic [3:0]       mii_rxd, mii_txd;
  logic [NPPU-1:0]  ppu_cmd_valid, ppu_cmd_ready, ppu_rsp_valid;
  dmm_cmd_t         ppu_cmd [NPPU];
  dmm_rsp_t         ppu_rsp;
  logic [NPPU-1:0]  ppu_cmm_valid, ppu_cmm_ready, ppu_cmm_rsp_valid;
  cmm_req_t         ppu_cmm_req [NPPU];
  cmm_rsp_t         ppu_cmm_rsp;
  logic [NPPU-1:0]  ppu_dp_we;
  logic [DPA_W-1:0] ppu_dp_addr [NPPU];
  logic [31:0]      ppu_dp_wdata [NPPU];
  logic [31:0]      ppu_dp_rdata [NPPU];
  logic [NPPU-1:0]  task_valid, ppu_done;
  flow_t            task_flow;
  pktid_t           task_pkt;
  len_t             task_len;
  logic             task_slot;
  logic             cpu_cmm_valid, cpu_cmm_ready, cpu_cmm_rsp_valid;
  cmm_req_t         cpu_cmm_req;
  logic             cfg_port_we, cfg_tsc_we, cfg_out_we;
  logic [1:0]       cfg_port, cfg_out_port;
  flow_t            cfg_in_flow;
  logic [1:0]       cfg_in_prio, cfg_tsc_prio, cfg_out_prio;
  logic [3:0]       cfg_tsc_weight, cfg_out_flow;
  logic [15:0]      cfg_out_vstep, cfg_out_rate, cfg_out_depth;
  logic             ready;
  logic [15:0]      mac_rx_ok [NPORT], mac_rx_drop [NPORT], mac_tx_sent [NPORT];
  logic [15:0]      dmm_drops, tsc_overflow, atm_cells_dropped;
  logic             atm_rx_clav, atm_rx_enb_n, atm_rx_soc, atm_tx_clav, atm_tx_enb_n, atm_tx_soc;
  logic [7:0]       atm_rx_data, atm_tx_data;

  gigaflow_top dut (.*);

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  typedef logic [7:0] bytes_t [$];
  localparam logic [47:0] MAC_A = 48'h02_00_00_00_00_0A, MAC_B = 48'h02_00_00_00_00_0B,
                          MAC_C = 48'h02_00_00_00_00_0C, MAC_X = 48'h02_00_00_00_99_99,
                          MAC_D = 48'h02_00_00_00_00_0D;
  localparam logic [87:0] TUN_HDR = 88'hAA_BB_CC_DD_EE_FF_11_22_33_44_55;
  localparam logic [15:0] LABEL   = 16'h1234;

  function automatic logic [31:0] fcs_of(input bytes_t b);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) for (int j = 0; j < 8; j++) begin
      logic fb;
      fb = c[0] ^ b[i][j];
      c = {1'b0, c[31:1]};
      if (fb) c = c ^ 32'hEDB8_8320;
    end
    return ~c;
  endfunction

  // ATM cell check bytes, bit serial: HEC (CRC-8, x^8+x^2+x+1, XOR 0x55) and
  // the AAL5 CRC-32 (MSB first)
  function automatic logic [7:0] hec_ref(input logic [7:0] h [4]);
    logic [7:0] c = 8'h00;
    for (int i = 0; i < 4; i++) for (int j = 7; j >= 0; j--) begin
      logic fb;
      fb = c[7] ^ h[i][j];
      c = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c ^ 8'h55;
  endfunction

  function automatic logic [31:0] aal5_crc(input bytes_t b);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) for (int j = 7; j >= 0; j--) begin
      logic fb;
      fb = c[31] ^ b[i][j];
      c = {c[30:0], 1'b0};
      if (fb) c = c ^ 32'h04C1_1DB7;
    end
    return ~c;
  endfunction

  function automatic bytes_t mkframe(logic [47:0] dst, logic [47:0] src, int vid, int plen, int tag);
    bytes_t b;
    for (int i = 5; i >= 0; i--) b.push_back(dst[8*i +: 8]);
    for (int i = 5; i >= 0; i--) b.push_back(src[8*i +: 8]);
    b.push_back(8'h81); b.push_back(8'h00);
    b.push_back(8'(vid >> 8)); b.push_back(8'(vid));
    b.push_back(8'h08); b.push_back(8'h00);
    for (int i = 0; i < plen; i++) b.push_back(8'(tag * 7 + i));
    return b;
  endfunction

  function automatic string key(input bytes_t b);
    string s = "";
    foreach (b[i]) s = {s, $sformatf("%02x", b[i])};
    return s;
  endfunction

  // expected frames per output port (content -> count)
  int expected [NPORT][string];
  int n_expected = 0, n_received = 0;
  function automatic void expect_out(int port, bytes_t b);
    bytes_t p;
    p = b;
    while (p.size() < 60) p.push_back(8'h00);
    if (expected[port].exists(key(p))) expected[port][key(p)]++;
    else expected[port][key(p)] = 1;
    n_expected++;
  endfunction

  // ---------------------------------------------------------------- line side
  int mii_phase = 0;
  always @(negedge clk) begin
    mii_ce = (mii_phase == 0);
    mii_phase = (mii_phase + 1) % 4;
  end

  task automatic gmii_send(int g, bytes_t b, bit bad_fcs);
    logic [31:0] f;
    bytes_t w;
    f = fcs_of(b) ^ (bad_fcs ? 32'h100 : 32'h0);
    for (int i = 0; i < 7; i++) w.push_back(8'h55);
    w.push_back(8'hD5);
    foreach (b[i]) w.push_back(b[i]);
    for (int i = 0; i < 4; i++) w.push_back(f[8*i +: 8]);
    foreach (w[i]) begin @(negedge clk); gmii_rx_dv[g] = 1; gmii_rxd[g] = w[i]; end
    @(negedge clk); gmii_rx_dv[g] = 0;
    repeat (12) @(negedge clk);
  endtask

  task automatic mii_send(bytes_t b);
    logic [31:0] f;
    bytes_t w;
    f = fcs_of(b);
    for (int i = 0; i < 7; i++) w.push_back(8'h55);
    w.push_back(8'hD5);
    foreach (b[i]) w.push_back(b[i]);
    for (int i = 0; i < 4; i++) w.push_back(f[8*i +: 8]);
    foreach (w[i]) for (int h = 0; h < 2; h++) begin
      @(negedge clk); while (mii_phase != 1) @(negedge clk);
      mii_rx_dv = 1; mii_rxd = h ? w[i][7:4] : w[i][3:0];
    end
    @(negedge clk); while (mii_phase != 1) @(negedge clk);
    mii_rx_dv = 0;
    repeat (48) @(negedge clk);
  endtask

  // line monitors: strip preamble, check FCS, match against expectations
  task automatic take_frame(int port, bytes_t w);
    bytes_t b;
    logic [31:0] f, got;
    checks++;
    if (w.size() < 8 + 64 || w[7] != 8'hD5) begin failures++; $display("port %0d: bad framing %0d bytes %s", port, w.size(), key(w)); return; end
    for (int i = 8; i < w.size() - 4; i++) b.push_back(w[i]);
    got = {w[w.size()-1], w[w.size()-2], w[w.size()-3], w[w.size()-4]};
    f = fcs_of(b);
    checks++;
    if (got != f) begin failures++; $display("port %0d: FCS wrong", port); end
    checks++;
    if (expected[port].exists(key(b)) && expected[port][key(b)] > 0) begin
      expected[port][key(b)]--;
      n_received++;
    end else begin
      failures++; $display("port %0d: unexpected frame of %0d bytes %s", port, b.size(), key(b));
    end
  endtask

  for (genvar g = 0; g < NGE; g++) begin : g_mon
    initial begin
      bytes_t w;
      forever begin
        @(posedge clk);
        if (!rst_n) w.delete();
        else if (gmii_tx_en[g]) w.push_back(gmii_txd[g]);
        else if (w.size() != 0) begin take_frame(g, w); w.delete(); end
      end
    end
  end
  int mii_frames_out = 0;
  initial begin
    bytes_t w;
    logic [3:0] lo;
    bit half;
    half = 0;
    forever begin
      @(posedge clk);
      if (rst_n && mii_ce) begin
        if (mii_tx_en) begin
          if (!half) lo = mii_txd; else w.push_back({mii_txd, lo});
          half = !half;
        end else if (w.size() != 0) begin
          take_frame(2, w); w.delete(); half = 0; mii_frames_out++;
        end
      end
    end
  end

  // ATM line: cells of VPI 0 / VCI 32 (the core's defaults) both ways
  task automatic atm_send(bytes_t f);
    bytes_t pdu;
    int n;
    logic [31:0] crc;
    pdu = {8'h00, 8'h00};
    foreach (f[i]) pdu.push_back(f[i]);
    n = (pdu.size() + 8 + 47) / 48;
    while (pdu.size() < n * 48 - 4) pdu.push_back(8'h00);
    pdu[n*48 - 6] = 8'((f.size() + 2) >> 8);
    pdu[n*48 - 5] = 8'(f.size() + 2);
    crc = aal5_crc(pdu);
    for (int i = 3; i >= 0; i--) pdu.push_back(crc[8*i +: 8]);
    for (int c = 0; c < n; c++) begin
      logic [7:0] h [4];
      bytes_t cl;
      h[0] = 8'h00; h[1] = 8'h00; h[2] = 8'h02; h[3] = {4'h0, 2'b00, c == n - 1, 1'b0};
      for (int i = 0; i < 4; i++) cl.push_back(h[i]);
      cl.push_back(hec_ref(h));
      for (int i = 0; i < 48; i++) cl.push_back(pdu[c*48 + i]);
      foreach (cl[i]) begin
        @(negedge clk); atm_rx_clav = 1; atm_rx_soc = (i == 0); atm_rx_data = cl[i];
      end
      @(negedge clk); atm_rx_clav = 0; atm_rx_soc = 0;
    end
  endtask

  always @(negedge clk) atm_tx_clav <= ($urandom % 4) != 0;

  int atm_frames_out = 0;
  initial begin
    bytes_t cl, pdu;
    forever begin
      @(posedge clk);
      if (rst_n && !atm_tx_enb_n) begin
        if (atm_tx_soc) cl.delete();
        cl.push_back(atm_tx_data);
        if (cl.size() == 53) begin
          logic [7:0] h [4];
          for (int i = 0; i < 4; i++) h[i] = cl[i];
          checks++;
          if (cl[4] != hec_ref(h) || {h[0], h[1], h[2], h[3][7:4]} != 28'h0000020) begin
            failures++; $display("ATM: bad cell header");
          end
          for (int i = 5; i < 53; i++) pdu.push_back(cl[i]);
          if (h[3][1]) begin
            automatic bytes_t body = {}, b = {};
            int l;
            l = {pdu[pdu.size() - 6], pdu[pdu.size() - 5]};
            for (int i = 0; i < pdu.size() - 4; i++) body.push_back(pdu[i]);
            checks++;
            if (aal5_crc(body) != {pdu[pdu.size() - 4], pdu[pdu.size() - 3], pdu[pdu.size() - 2], pdu[pdu.size() - 1]}
                || l < 2 || l + 8 > pdu.size()) begin
              failures++; $display("ATM: bad AAL5 trailer");
            end else begin
              for (int i = 2; i < l; i++) b.push_back(pdu[i]);
              checks++;
              if (expected[3].exists(key(b)) && expected[3][key(b)] > 0) begin
                expected[3][key(b)]--;
                n_received++;
              end else begin
                failures++; $display("port 3: unexpected frame of %0d bytes %s", b.size(), key(b));
              end
            end
            atm_frames_out++;
            pdu.delete();
          end
          cl.delete();
        end
      end
    end
  end

  // ---------------------------------------------------------------- control CPU
  task automatic cpu_cmm(cmm_req_t r);
    @(negedge clk); cpu_cmm_valid = 1; cpu_cmm_req = r;
    do @(posedge clk); while (!cpu_cmm_ready);
    @(negedge clk) cpu_cmm_valid = 0;
    while (!cpu_cmm_rsp_valid) @(posedge clk);
  endtask

  task automatic cfg_out(int port, int flow, int vstep, int prio, int rate, int depth);
    @(negedge clk);
    cfg_out_we = 1; cfg_out_port = 2'(port); cfg_out_flow = 4'(flow); cfg_out_vstep = 16'(vstep);
    cfg_out_prio = 2'(prio); cfg_out_rate = 16'(rate); cfg_out_depth = 16'(depth);
    @(negedge clk) cfg_out_we = 0;
  endtask

  // ---------------------------------------------------------------- PPU models
  typedef struct { flow_t flow; pktid_t pkt; len_t len; int slot; } task_t;
  task_t tq [NPPU][$];
  int    outstanding [NPPU], max_outstanding [NPPU], tasks_per_ppu [NPPU];
  int    n_rewrite = 0, n_flood = 0, n_learned_fwd = 0, n_learn = 0;

  always @(posedge clk) if (rst_n) for (int k = 0; k < NPPU; k++) if (task_valid[k]) begin
    task_t t;
    t.flow = task_flow; t.pkt = task_pkt; t.len = task_len; t.slot = int'(task_slot);
    tq[k].push_back(t);
    outstanding[k]++;
    tasks_per_ppu[k]++;
    if (outstanding[k] > max_outstanding[k]) max_outstanding[k] = outstanding[k];
  end

  task automatic ppu_dmm(int k, dmm_cmd_t c, output dmm_rsp_t r);
    @(negedge clk); ppu_cmd_valid[k] = 1; ppu_cmd[k] = c;
    do @(posedge clk); while (!ppu_cmd_ready[k]);
    @(negedge clk) ppu_cmd_valid[k] = 0;
    while (!ppu_rsp_valid[k]) @(posedge clk);
    r = ppu_rsp;
  endtask

  task automatic ppu_cmm(int k, cmm_req_t q, output cmm_rsp_t r);
    @(negedge clk); ppu_cmm_valid[k] = 1; ppu_cmm_req[k] = q;
    do @(posedge clk); while (!ppu_cmm_ready[k]);
    @(negedge clk) ppu_cmm_valid[k] = 0;
    while (!ppu_cmm_rsp_valid[k]) @(posedge clk);
    r = ppu_cmm_rsp;
  endtask

  task automatic dp_read(int k, int a, output logic [31:0] d);
    @(negedge clk); ppu_dp_addr[k] = DPA_W'(a);
    @(posedge clk); #1 d = ppu_dp_rdata[k];
  endtask

  task automatic dp_write(int k, int a, logic [31:0] d);
    @(negedge clk); ppu_dp_we[k] = 1; ppu_dp_addr[k] = DPA_W'(a); ppu_dp_wdata[k] = d;
    @(negedge clk); ppu_dp_we[k] = 0;
  endtask

  function automatic dmm_cmd_t dc(dmm_op_e op, int flow, int pkt, int ppu, int base, int nb);
    dmm_cmd_t c;
    c = '0; c.op = op; c.flow = flow_t'(flow); c.pkt = pktid_t'(pkt); c.ppu = PPU_W'(ppu);
    c.dp_base = DPA_W'(base); c.nbytes = 11'(nb);
    return c;
  endfunction

  task automatic ppu_run(int k);
    forever begin
      task_t t;
      bytes_t h;
      logic [31:0] w;
      logic [47:0] dst, src;
      int vid, in_port, base, n1;
      cmm_req_t q;
      cmm_rsp_t r;
      dmm_rsp_t dr;
      int outs [$];
      while (tq[k].size() == 0) @(posedge clk);
      t = tq[k].pop_front();
      base = t.slot * 256;
      n1 = (int'(t.len) < 64) ? int'(t.len) : 64;
      for (int i = 0; i < (n1 + 3) / 4; i++) begin
        dp_read(k, base + i, w);
        for (int j = 0; j < 4; j++) if (4 * i + j < n1) h.push_back(w[31 - 8*j -: 8]);
      end
      for (int i = 0; i < 6; i++) begin dst[47 - 8*i -: 8] = h[i]; src[47 - 8*i -: 8] = h[6 + i]; end
      vid = {h[14][3:0], h[15]};
      in_port = int'(t.flow);
      // source learning
      q = '0; q.op = CMM_LEARN; q.mac = src; q.vid = 12'(vid); q.result = 16'(in_port);
      ppu_cmm(k, q, r);
      n_learn++;
      // classification
      q = '0; q.op = CMM_CLASSIFY; q.mac = dst; q.vid = 12'(vid);
      ppu_cmm(k, q, r);
      if (r.hit) begin
        outs.push_back(OUT_BASE + int'(r.result) * OUT_FLOWS + int'(r.ctx.out_q0));
        if (dst == MAC_A || dst == MAC_C || dst == MAC_D) n_learned_fwd++;
      end else begin
        for (int p = 0; p < NPORT; p++) if (p != in_port) outs.push_back(OUT_BASE + p * OUT_FLOWS);
        n_flood++;
      end
      repeat ($urandom_range(100, 300)) @(negedge clk);   // header processing time
      if (r.vlan_ok && r.ctx.proto == 4'd1) begin
        // encapsulation: tunnel header + MPLS label in front of the first segment
        bytes_t nh;
        for (int i = 10; i >= 0; i--) nh.push_back(r.ctx.l2_hdr[8*i +: 8]);
        nh.push_back(8'(r.ctx.out_q1 >> 4)); nh.push_back(8'({r.ctx.out_q1[3:0], 4'h1}));
        nh.push_back(8'h00); nh.push_back(8'd64);
        foreach (h[i]) nh.push_back(h[i]);
        for (int i = 0; i < (nh.size() + 3) / 4; i++) begin
          logic [31:0] v;
          v = '0;
          for (int j = 0; j < 4; j++) if (4 * i + j < nh.size()) v[31 - 8*j -: 8] = nh[4*i + j];
          dp_write(k, base + i, v);
        end
        ppu_dmm(k, dc(DMM_WRITE_HDR, 0, int'(t.pkt), k, base, nh.size()), dr);
        if (dr.ok) n_rewrite++;
      end
      foreach (outs[i]) ppu_dmm(k, dc(DMM_ENQUEUE, outs[i], int'(t.pkt), 0, 0, 0), dr);
      ppu_dmm(k, dc(DMM_RELEASE, 0, int'(t.pkt), 0, 0, 0), dr);
      @(negedge clk) ppu_done[k] = 1;
      outstanding[k]--;
      @(negedge clk) ppu_done[k] = 0;
    end
  endtask

  for (genvar k = 0; k < NPPU; k++) begin : g_ppu
    initial begin
      ppu_cmd_valid[k] = 0; ppu_cmd[k] = '0; ppu_cmm_valid[k] = 0; ppu_cmm_req[k] = '0;
      ppu_dp_we[k] = 0; ppu_dp_addr[k] = '0; ppu_dp_wdata[k] = '0; ppu_done[k] = 0;
      outstanding[k] = 0; max_outstanding[k] = 0; tasks_per_ppu[k] = 0;
      wait (ready);
      ppu_run(k);
    end
  end

  // shaper activity and output-flow sharing on the uplink
  int shaped_cycles = 0, uplink_flows_used = 0;
  bit uplink_flow_seen [2];
  always @(posedge clk) if (rst_n) begin
    if (!dut.g_out[1].conform[1]) shaped_cycles++;
    if (dut.tx_req_valid && dut.tx_req_ready && dut.tx_req_port == 2'd1)
      uplink_flow_seen[int'(dut.tx_req_flow) - (OUT_BASE + OUT_FLOWS)] = 1;
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    cmm_req_t r;
    automatic bytes_t f;
    gmii_rx_dv = '0; gmii_rx_er = '0; mii_rx_dv = 0; mii_rx_er = 0; mii_rxd = 0;
    atm_rx_clav = 0; atm_rx_soc = 0; atm_rx_data = 0;
    for (int g = 0; g < NGE; g++) gmii_rxd[g] = 0;
    cpu_cmm_valid = 0; cpu_cmm_req = '0;
    cfg_port_we = 0; cfg_port = 0; cfg_in_flow = '0; cfg_in_prio = 0;
    cfg_tsc_we = 0; cfg_tsc_prio = 0; cfg_tsc_weight = 0;
    cfg_out_we = 0; cfg_out_port = 0; cfg_out_flow = 0; cfg_out_vstep = 0; cfg_out_prio = 0;
    cfg_out_rate = 0; cfg_out_depth = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (ready);
    // VLAN tables: VLAN 10 plain bridging, VLAN 20 MPLS tunnel
    r = '0; r.op = CMM_VCFG_WR; r.vid = 12'd10; r.vidx = 11'd3;  cpu_cmm(r);
    r = '0; r.op = CMM_VCFG_WR; r.vid = 12'd20; r.vidx = 11'd4;  cpu_cmm(r);
    r = '0; r.op = CMM_VCTX_WR; r.vidx = 11'd3; r.ctx = '{proto: 4'd0, out_q0: 16'd0, out_q1: 16'd0, l2_hdr: '0}; cpu_cmm(r);
    r = '0; r.op = CMM_VCTX_WR; r.vidx = 11'd4; r.ctx = '{proto: 4'd1, out_q0: 16'd1, out_q1: LABEL, l2_hdr: TUN_HDR}; cpu_cmm(r);
    // station B behind the uplink (port 1), on both VLANs
    r = '0; r.op = CMM_LEARN; r.mac = MAC_B; r.vid = 12'd10; r.result = 16'd1; cpu_cmm(r);
    r = '0; r.op = CMM_LEARN; r.mac = MAC_B; r.vid = 12'd20; r.result = 16'd1; cpu_cmm(r);
    // uplink: flow 0 (bridged) and flow 1 (tunnel, shaped to 0.25 byte/cycle)
    cfg_out(1, 0, 256, 0, 0, 0);
    cfg_out(1, 1, 256, 0, 64, 200);

    fork
      for (int i = 0; i < 12; i++) begin
        automatic bytes_t f;
        f = mkframe(MAC_B, MAC_A, 10, 46 + 9 * i, i);
        expect_out(1, f);
        gmii_send(0, f, 0);
        f = mkframe(MAC_B, MAC_A, 20, 46 + 5 * i, 100 + i);
        begin
          automatic bytes_t e;
          for (int j = 10; j >= 0; j--) e.push_back(TUN_HDR[8*j +: 8]);
          e.push_back(8'(LABEL >> 4)); e.push_back(8'({LABEL[3:0], 4'h1}));
          e.push_back(8'h00); e.push_back(8'd64);
          foreach (f[j]) e.push_back(f[j]);
          expect_out(1, e);
        end
        gmii_send(0, f, 0);
      end
      for (int i = 0; i < 4; i++) begin
        automatic bytes_t f;
        f = mkframe(MAC_X, MAC_C, 10, 50 + i, 200 + i);
        expect_out(0, f);
        expect_out(1, f);
        expect_out(3, f);
        mii_send(f);
      end
      for (int i = 0; i < 2; i++) begin
        automatic bytes_t f;
        f = mkframe(MAC_A, MAC_B, 10, 60, 300 + i);
        gmii_send(1, f, 1);
      end
    join
    wait (n_received == n_expected);
    // phase 2: destinations known only through learning
    for (int i = 0; i < 4; i++) begin
      f = mkframe(MAC_A, MAC_B, 10, 70 + i, 400 + i);
      expect_out(0, f);
      gmii_send(1, f, 0);
    end
    for (int i = 0; i < 2; i++) begin
      f = mkframe(MAC_C, MAC_B, 10, 80 + i, 500 + i);
      expect_out(2, f);
      gmii_send(1, f, 0);
    end
    for (int i = 0; i < 2; i++) begin
      f = mkframe(MAC_A, MAC_D, 10, 90 + 13 * i, 600 + i);
      expect_out(0, f);
      atm_send(f);
    end
    wait (n_received == n_expected);
    for (int i = 0; i < 2; i++) begin
      f = mkframe(MAC_D, MAC_B, 10, 100 + 7 * i, 700 + i);
      expect_out(3, f);
      gmii_send(1, f, 0);
    end
    wait (n_received == n_expected);
    repeat (2000) @(posedge clk);

    // mechanisms
    checks += 15;
    if (n_received != 46) begin failures++; $display("received %0d frames", n_received); end
    if (mac_rx_ok[0] != 24 || mac_rx_ok[1] != 8 || mac_rx_ok[2] != 4 || mac_rx_ok[3] != 2) begin
      failures++; $display("rx counts %0d %0d %0d %0d", mac_rx_ok[0], mac_rx_ok[1], mac_rx_ok[2], mac_rx_ok[3]);
    end
    if (mac_rx_drop[1] != 2) begin failures++; $display("FCS drops %0d", mac_rx_drop[1]); end
    for (int k = 0; k < NPPU; k++)
      if (tasks_per_ppu[k] == 0) begin failures++; $display("PPU %0d idle", k); end
    begin
      int pre = 0;
      for (int k = 0; k < NPPU; k++) if (max_outstanding[k] >= 2) pre++;
      if (pre == 0) begin failures++; $display("no header prefetch"); end
    end
    if (n_rewrite != 12) begin failures++; $display("rewrites %0d", n_rewrite); end
    if (n_flood != 4) begin failures++; $display("floods %0d", n_flood); end
    if (n_learned_fwd != 10) begin failures++; $display("learned forwards %0d", n_learned_fwd); end
    if (shaped_cycles == 0) begin failures++; $display("shaper never held the tunnel flow"); end
    if (!uplink_flow_seen[0] || !uplink_flow_seen[1]) begin failures++; $display("uplink flows not shared"); end
    if (mii_frames_out != 2) begin failures++; $display("MII frames out %0d", mii_frames_out); end
    if (dmm_drops != 0 || tsc_overflow != 0) begin failures++; $display("internal drops"); end
    if (atm_frames_out != 6 || mac_tx_sent[3] != 6 || atm_cells_dropped != 0 || mac_rx_drop[3] != 0) begin
      failures++; $display("ATM frames out %0d", atm_frames_out);
    end
    if (n_learn != 38) begin failures++; $display("learn requests %0d", n_learn); end
    $display("mechanisms: rx_ok=%0d/%0d/%0d fcs_drop=%0d tasks=%0d/%0d/%0d/%0d maxout=%0d/%0d/%0d/%0d rewrite=%0d flood=%0d learned_fwd=%0d shaped_cycles=%0d mii_out=%0d atm_out=%0d",
             mac_rx_ok[0], mac_rx_ok[1], mac_rx_ok[2], mac_rx_drop[1],
             tasks_per_ppu[0], tasks_per_ppu[1], tasks_per_ppu[2], tasks_per_ppu[3],
             max_outstanding[0], max_outstanding[1], max_outstanding[2], max_outstanding[3],
             n_rewrite, n_flood, n_learned_fwd, shaped_cycles, mii_frames_out, atm_frames_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
