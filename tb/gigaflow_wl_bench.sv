// gigaflow_wl_bench: one instance of the workload bench, with NPPU
// processing units attached to a GigaFlow core that is otherwise at its
// default sizes.
//
// Minimum-size (64-byte) frames with an 8-byte gap between them arrive back
// to back, once for each flow type:
//   Eth-Eth  : VLAN 10 frames from port 0 bridged unchanged to port 1;
//   Eth-MPLS : VLAN 20 frames from port 0 encapsulated (tunnel header + MPLS
//              label) towards the uplink, port 1;
//   MPLS-Eth : encapsulated frames arriving on the uplink, port 1, stripped of
//              tunnel header and label and bridged to port 0.
// NPPU processing-unit models do the work (header read, learning, CLASSIFY,
// rewrite with WRITE_HDR, ENQUEUE, RELEASE); each spends PPU_CYCLES of
// software time per packet on top of its command traffic. The bench measures
// the forwarded packet rate of each flow type and checks every frame that
// leaves a port, FCS included. It raises `done` when finished and reports its
// check and failure counts on its outputs; tb_gigaflow_workload runs it with
// one and with four processing units.
module gigaflow_wl_bench #(parameter int NPPU = 4) (
  output logic done,
  output int   n_checks,
  output int   n_failures
);
  import gf_pkg::*;
  localparam int PPU_CYCLES = 150;
  localparam int NGE = 2, NPORT = 4, OUT_BASE = 1024, OUT_FLOWS = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  assign n_checks = checks;
  assign n_failures = failures;
  initial done = 1'b0;

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
  // ATM port idle: no cells in, cells out always accepted
  logic             atm_rx_clav = 0, atm_rx_enb_n, atm_rx_soc = 0, atm_tx_clav = 1, atm_tx_enb_n, atm_tx_soc;
  logic [7:0]       atm_rx_data = '0, atm_tx_data;

  gigaflow_top #(.NPPU(NPPU)) dut (.*);


  // ---------------------------------------------------------------- helpers
  typedef logic [7:0] bytes_t [$];
  localparam logic [47:0] MAC_A = 48'h02_00_00_00_00_0A, MAC_B = 48'h02_00_00_00_00_0B,
                          MAC_C = 48'h02_00_00_00_00_0C, MAC_X = 48'h02_00_00_00_99_99;
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
  int    n_decap = 0, n_rewrite = 0, n_flood = 0, n_learned_fwd = 0, n_learn = 0;

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
      in_port = int'(t.flow);
      if (in_port == 1) begin
        // MPLS-Eth: strip the 11-byte tunnel header and the 4-byte label
        for (int i = 0; i < 15; i++) void'(h.pop_front());
        n_decap++;
      end
      for (int i = 0; i < 6; i++) begin dst[47 - 8*i -: 8] = h[i]; src[47 - 8*i -: 8] = h[6 + i]; end
      vid = {h[14][3:0], h[15]};
      // source learning
      q = '0; q.op = CMM_LEARN; q.mac = src; q.vid = 12'(vid); q.result = 16'(in_port);
      ppu_cmm(k, q, r);
      n_learn++;
      // classification
      q = '0; q.op = CMM_CLASSIFY; q.mac = dst; q.vid = 12'(vid);
      ppu_cmm(k, q, r);
      if (r.hit) begin
        outs.push_back(OUT_BASE + int'(r.result) * OUT_FLOWS + int'(r.ctx.out_q0));
        if (dst == MAC_A || dst == MAC_C) n_learned_fwd++;
      end else begin
        for (int p = 0; p < NPORT; p++) if (p != in_port) outs.push_back(OUT_BASE + p * OUT_FLOWS);
        n_flood++;
      end
      repeat (PPU_CYCLES) @(negedge clk);   // software processing time
      if (in_port == 1) begin
        for (int i = 0; i < (h.size() + 3) / 4; i++) begin
          logic [31:0] v;
          v = '0;
          for (int j = 0; j < 4; j++) if (4 * i + j < h.size()) v[31 - 8*j -: 8] = h[4*i + j];
          dp_write(k, base + i, v);
        end
        ppu_dmm(k, dc(DMM_WRITE_HDR, 0, int'(t.pkt), k, base, h.size()), dr);
        if (dr.ok) n_rewrite++;
      end else if (r.vlan_ok && r.ctx.proto == 4'd1) begin
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

  // ---------------------------------------------------------------- stimulus
  // time stamps of forwarded frames, per flow type
  longint t_first, t_last;
  int n_seen = 0;
  bit first_pending = 1'b0;
  always @(posedge clk) if (rst_n && n_received != n_seen) begin
    if (first_pending) begin t_first = $time; first_pending = 1'b0; end
    t_last = $time;
    n_seen = n_received;
  end

  function automatic bytes_t encap(bytes_t f);
    bytes_t e;
    for (int j = 10; j >= 0; j--) e.push_back(TUN_HDR[8*j +: 8]);
    e.push_back(8'(LABEL >> 4)); e.push_back(8'({LABEL[3:0], 4'h1}));
    e.push_back(8'h00); e.push_back(8'd64);
    foreach (f[j]) e.push_back(f[j]);
    return e;
  endfunction

  // back-to-back 64-byte frames (60 + FCS ... 18-byte header + 42 payload +
  // 4 FCS = 64), 8-byte gap
  task automatic burst(int kind, int n, output int fwd, output real kpps);
    int rx0, base_rx;
    base_rx = n_received;
    n_seen = n_received;
    first_pending = 1'b1;
    for (int i = 0; i < n; i++) begin
      automatic bytes_t f;
      if (kind == 0) begin
        f = mkframe(MAC_B, MAC_A + (48'(i % 8) << 16), 10, 42, i);
        expect_out(1, f);
        gmii_burst(0, f);
      end else if (kind == 1) begin
        f = mkframe(MAC_B, MAC_A + (48'(i % 8) << 16), 20, 42, i);
        expect_out(1, encap(f));
        gmii_burst(0, f);
      end else begin
        // 64-byte frame on the wire: tunnel header + label + 45-byte inner frame
        f = mkframe(MAC_A, MAC_B, 10, 27, i);
        expect_out(0, f);
        gmii_burst(1, encap(f));
      end
    end
    // wait until the output has been quiet for 5000 cycles
    begin
      int last, quiet;
      last = n_received; quiet = 0;
      while (quiet < 5000) begin
        @(posedge clk);
        if (n_received != last) begin last = n_received; quiet = 0; end
        else quiet++;
      end
    end
    fwd = n_received - base_rx;
    begin
      string tl;
      tl = "";
      for (int k = 0; k < NPPU; k++) tl = {tl, $sformatf(" %0d", tasks_per_ppu[k])};
      $display("%0d PPU(s), after burst %0d: rx_ok %0d/%0d rx_drop %0d/%0d dmm_drops %0d tsc_ovf %0d tasks per PPU:%s",
               NPPU, kind, mac_rx_ok[0], mac_rx_ok[1], mac_rx_drop[0], mac_rx_drop[1], dmm_drops, tsc_overflow, tl);
    end
    kpps = (fwd > 1) ? real'(fwd - 1) * 1.0e6 / real'(t_last - t_first) : 0.0;
    // frames lost at the input are not expected any more
    n_expected = n_received;
    foreach (expected[p]) expected[p].delete();
  endtask

  task automatic gmii_burst(int g, bytes_t b);
    logic [31:0] f;
    bytes_t w;
    f = fcs_of(b);
    for (int i = 0; i < 7; i++) w.push_back(8'h55);
    w.push_back(8'hD5);
    foreach (b[i]) w.push_back(b[i]);
    for (int i = 0; i < 4; i++) w.push_back(f[8*i +: 8]);
    foreach (w[i]) begin @(negedge clk); gmii_rx_dv[g] = 1; gmii_rxd[g] = w[i]; end
    @(negedge clk); gmii_rx_dv[g] = 0;
    repeat (7) @(negedge clk);
  endtask

  initial begin
    cmm_req_t r;
    int fwd [3];
    real kpps [3];
    string names [3] = '{"Eth-Eth", "Eth-MPLS", "MPLS-Eth"};
    gmii_rx_dv = '0; gmii_rx_er = '0; mii_rx_dv = 0; mii_rx_er = 0; mii_rxd = 0;
    for (int g = 0; g < NGE; g++) gmii_rxd[g] = 0;
    cpu_cmm_valid = 0; cpu_cmm_req = '0;
    cfg_port_we = 0; cfg_port = 0; cfg_in_flow = '0; cfg_in_prio = 0;
    cfg_tsc_we = 0; cfg_tsc_prio = 0; cfg_tsc_weight = 0;
    cfg_out_we = 0; cfg_out_port = 0; cfg_out_flow = 0; cfg_out_vstep = 0; cfg_out_prio = 0;
    cfg_out_rate = 0; cfg_out_depth = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (ready);
    r = '0; r.op = CMM_VCFG_WR; r.vid = 12'd10; r.vidx = 11'd3;  cpu_cmm(r);
    r = '0; r.op = CMM_VCFG_WR; r.vid = 12'd20; r.vidx = 11'd4;  cpu_cmm(r);
    r = '0; r.op = CMM_VCTX_WR; r.vidx = 11'd3; r.ctx = '{proto: 4'd0, out_q0: 16'd0, out_q1: 16'd0, l2_hdr: '0}; cpu_cmm(r);
    r = '0; r.op = CMM_VCTX_WR; r.vidx = 11'd4; r.ctx = '{proto: 4'd1, out_q0: 16'd1, out_q1: LABEL, l2_hdr: TUN_HDR}; cpu_cmm(r);
    r = '0; r.op = CMM_LEARN; r.mac = MAC_B; r.vid = 12'd10; r.result = 16'd1; cpu_cmm(r);
    r = '0; r.op = CMM_LEARN; r.mac = MAC_B; r.vid = 12'd20; r.result = 16'd1; cpu_cmm(r);
    r = '0; r.op = CMM_LEARN; r.mac = MAC_A; r.vid = 12'd10; r.result = 16'd0; cpu_cmm(r);
    for (int k = 0; k < 3; k++) burst(k, 200, fwd[k], kpps[k]);
    checks += 5;
    for (int k = 0; k < 3; k++) begin
      $display("%0d PPU(s) %s: %0d of 200 frames forwarded, %0.0f kpps (%0.0f Mbit/s of 64-byte frames)",
               NPPU, names[k], fwd[k], kpps[k], kpps[k] * 64.0 * 8.0 / 1000.0);
      if (fwd[k] < 190) begin failures++; $display("%s: too few frames forwarded", names[k]); end
    end
    if (n_decap == 0 || n_rewrite == 0) begin failures++; $display("no rewrite"); end
    if (dmm_drops != 0) begin failures++; $display("packet storage overflowed"); end
    done = 1'b1;
  end
endmodule
