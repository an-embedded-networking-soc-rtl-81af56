// tb_dmm: self-checking test of the data memory manager.
// Small configuration (64 flows, 64 segments of 64 bytes, 16 packets). Frame
// sources stand in for the receive MACs; transmit pushes are collected per
// port; two DP-RAMs are attached. Checked against byte queues kept here:
// reception and arrival notice, FETCH of a header into a DP-RAM, header
// replacement by a longer header (encapsulation), enqueue to an output flow,
// copy to a second output flow (flooding, one stored copy), transmission of
// both copies with the rewritten header, MOVE, DEQUEUE on an empty queue,
// one-word-per-cycle streaming, storage reuse over many packets (no leak) and
// dropping of frames when packet ids run out.
module tb_dmm;
  import gf_pkg::*;
  localparam int NPORT = 2, NPPU = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             init_done, cmd_valid, cmd_ready, rsp_valid;
  dmm_cmd_t         cmd;
  dmm_rsp_t         rsp;
  logic [NPORT-1:0] rx_avail, rx_pop, tx_push;
  len_t             rx_len [NPORT];
  logic [9:0]       rx_idx;
  logic [31:0]      rx_data [NPORT];
  logic             cfg_we;
  logic             cfg_port;
  flow_t            cfg_flow, arr_flow;
  logic [1:0]       cfg_prio, arr_prio;
  logic             arr_valid, enq_valid, deq_valid;
  q_evt_t           enq_evt, deq_evt;
  logic             tx_req_valid, tx_req_ready, tx_last, tx_done_valid;
  flow_t            tx_req_flow;
  logic             tx_req_port, tx_done_port;
  logic [31:0]      tx_data;
  logic [2:0]       tx_nb;
  len_t             tx_done_len;
  logic [NPPU-1:0]  dp_we;
  logic [DPA_W-1:0] dp_addr;
  logic [31:0]      dp_wdata;
  logic [31:0]      dp_rdata [NPPU];
  logic [15:0]      rx_drops;

  dmm #(.NFLOWS(64), .NSEG(64), .SEG_WORDS(16), .NPKT(16), .NDESC(32), .NPORT(NPORT),
        .NPPU(NPPU), .RX_AW(10)) dut (.*);

  // DP-RAMs, port B driven by the test as the processing unit
  logic             pb_we [NPPU];
  logic [DPA_W-1:0] pb_addr [NPPU];
  logic [31:0]      pb_wdata [NPPU], pb_rdata [NPPU];
  for (genvar k = 0; k < NPPU; k++) begin : g_dp
    dpram #(.WORDS(512)) u_dp (.clk, .a_we(dp_we[k]), .a_addr(dp_addr), .a_wdata(dp_wdata),
      .a_rdata(dp_rdata[k]), .b_we(pb_we[k]), .b_addr(pb_addr[k]), .b_wdata(pb_wdata[k]),
      .b_rdata(pb_rdata[k]));
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame sources: bytes of all waiting frames back to back in a ring, and
  // the frame lengths
  logic [7:0] rxb [NPORT][65536];
  int         rxh [NPORT], rxt [NPORT];
  int         rxl [NPORT][$];
  int         cur_len [NPORT];
  for (genvar q = 0; q < NPORT; q++) begin : g_rx
    always_comb begin
      rx_avail[q] = (cur_len[q] != 0);
      rx_len[q]   = 16'(cur_len[q]);
      for (int j = 0; j < 4; j++)
        rx_data[q][31 - 8*j -: 8] = rxb[q][16'(rxh[q] + 4 * int'(rx_idx) + j)];
    end
    always @(posedge clk) begin
      if (rst_n && rx_pop[q]) begin
        rxh[q] = rxh[q] + cur_len[q];
        void'(rxl[q].pop_front());
      end
      cur_len[q] <= (rxl[q].size() != 0) ? rxl[q][0] : 0;
    end
  end

  task automatic give(input int q, input logic [7:0] b [$]);
    foreach (b[i]) begin rxb[q][16'(rxt[q])] = b[i]; rxt[q]++; end
    rxl[q].push_back(b.size());
  endtask

  // transmit collectors
  logic [7:0] txq [NPORT][$];
  int         tx_words [NPORT];
  int         tx_first_cyc, tx_last_cyc, cyc;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) for (int q = 0; q < NPORT; q++) if (tx_push[q]) begin
      for (int j = 0; j < int'(tx_nb); j++) txq[q].push_back(tx_data[31 - 8*j -: 8]);
      if (tx_words[q] == 0) tx_first_cyc = cyc;
      tx_words[q]++;
      tx_last_cyc = cyc;
    end
  end

  int arrivals = 0;
  always @(posedge clk) if (rst_n && arr_valid) arrivals++;

  task automatic command(input dmm_cmd_t c, output dmm_rsp_t r);
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
    while (!rsp_valid) @(posedge clk);
    r = rsp;
  endtask

  task automatic transmit(input int flow, input int port, output len_t len);
    @(negedge clk);
    tx_req_valid = 1; tx_req_flow = flow_t'(flow); tx_req_port = 1'(port);
    do @(posedge clk); while (!tx_req_ready);
    @(negedge clk) tx_req_valid = 0;
    while (!tx_done_valid) @(posedge clk);
    len = tx_done_len;
  endtask

  function automatic dmm_cmd_t mk(dmm_op_e op, int flow, int dst, int pkt, int ppu, int base, int nb);
    dmm_cmd_t c;
    c = '0; c.op = op; c.flow = flow_t'(flow); c.dst = flow_t'(dst); c.pkt = pktid_t'(pkt);
    c.ppu = PPU_W'(ppu); c.dp_base = DPA_W'(base); c.nbytes = 11'(nb);
    return c;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic ppu_read(input int k, input int addr, output logic [31:0] d);
    @(negedge clk); pb_addr[k] = DPA_W'(addr);
    @(posedge clk); #1 d = pb_rdata[k];
  endtask

  task automatic ppu_write(input int k, input int addr, input logic [31:0] d);
    @(negedge clk); pb_we[k] = 1; pb_addr[k] = DPA_W'(addr); pb_wdata[k] = d;
    @(negedge clk); pb_we[k] = 0;
  endtask

  initial begin
    logic [7:0] f [$];
    logic [7:0] hdr [$];
    logic [7:0] expect_tx [$];
    dmm_rsp_t r;
    len_t len;
    int pkt, t0;
    logic [31:0] w;

    cmd_valid = 0; cmd = '0; cfg_we = 0; cfg_port = 0; cfg_flow = '0; cfg_prio = 0;
    tx_req_valid = 0; tx_req_flow = '0; tx_req_port = 0; cyc = 0;
    for (int k = 0; k < NPPU; k++) begin pb_we[k] = 0; pb_addr[k] = '0; pb_wdata[k] = '0; end
    for (int q = 0; q < NPORT; q++) begin tx_words[q] = 0; rxh[q] = 0; rxt[q] = 0; cur_len[q] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    // port 1 feeds input flow 5
    @(negedge clk); cfg_we = 1; cfg_port = 1; cfg_flow = flow_t'(5); cfg_prio = 2;
    @(negedge clk); cfg_we = 0;

    // 1. receive 150 bytes on port 0 (input flow 0)
    for (int i = 0; i < 150; i++) f.push_back(8'($urandom));
    give(0, f);
    wait (arrivals == 1);
    command(mk(DMM_QLEN, 0, 0, 0, 0, 0, 0), r);
    check(r.ok && r.data == 1, "qlen after reception");

    // 2. fetch the header into DP-RAM 0, buffer at word 256
    command(mk(DMM_FETCH, 0, 0, 0, 0, 256, 64), r);
    check(r.ok && r.data[31:16] == 16'd150, "fetch length");
    pkt = int'(r.data[15:0]);
    for (int i = 0; i < 16; i++) begin
      ppu_read(0, 256 + i, w);
      check(w == {f[4*i], f[4*i+1], f[4*i+2], f[4*i+3]}, $sformatf("header word %0d", i));
    end
    command(mk(DMM_QLEN, 0, 0, 0, 0, 0, 0), r);
    check(r.data == 0, "input queue empty after fetch");

    // 3. replace the first 64 bytes by an 86-byte header (encapsulation)
    for (int i = 0; i < 86; i++) hdr.push_back(8'($urandom));
    for (int i = 0; i < 22; i++) begin
      logic [31:0] v;
      v = '0;
      for (int j = 0; j < 4; j++) if (4*i + j < 86) v[31 - 8*j -: 8] = hdr[4*i + j];
      ppu_write(0, 256 + i, v);
    end
    command(mk(DMM_WRITE_HDR, 0, 0, pkt, 0, 256, 86), r);
    check(r.ok && r.data[31:16] == 16'd172, "length after header rewrite");
    expect_tx = hdr;
    for (int i = 64; i < 150; i++) expect_tx.push_back(f[i]);

    // 4. queue on output flow 40, copy to 41, release the processing reference
    command(mk(DMM_ENQUEUE, 40, 0, pkt, 0, 0, 0), r);
    check(r.ok, "enqueue");
    command(mk(DMM_COPY, 40, 41, 0, 0, 0, 0), r);
    check(r.ok, "copy");
    command(mk(DMM_RELEASE, 0, 0, pkt, 0, 0, 0), r);
    check(r.ok, "release");
    command(mk(DMM_PKT_LEN, 0, 0, pkt, 0, 0, 0), r);
    check(r.ok && r.data[31:16] == 16'd172 && r.data[6:0] == 7'd64, "packet still stored");

    // 5. transmit both copies; one word per cycle
    transmit(40, 1, len);
    check(len == 16'd172, "tx length port 1");
    check(txq[1] == expect_tx, "tx bytes port 1");
    check(tx_last_cyc - tx_first_cyc + 1 == tx_words[1], "one word per cycle");
    transmit(41, 0, len);
    check(txq[0] == expect_tx, "tx bytes port 0 (flooded copy)");
    command(mk(DMM_PKT_LEN, 0, 0, pkt, 0, 0, 0), r);
    check(!r.ok, "packet freed after last transmission");

    // 6. empty queues fail; MOVE relinks without copying
    command(mk(DMM_DEQUEUE, 40, 0, 0, 0, 0, 0), r);
    check(!r.ok, "dequeue of empty queue fails");
    f.delete();
    for (int i = 0; i < 64; i++) f.push_back(8'(i));
    give(1, f);
    wait (arrivals == 2);
    command(mk(DMM_QLEN, 5, 0, 0, 0, 0, 0), r);
    check(r.data == 1, "port 1 uses its configured input flow");
    command(mk(DMM_MOVE, 5, 33, 0, 0, 0, 0), r);
    check(r.ok, "move");
    command(mk(DMM_QLEN, 33, 0, 0, 0, 0, 0), r);
    check(r.data == 1, "moved packet in destination");
    txq[0].delete();
    transmit(33, 0, len);
    check(txq[0] == f, "moved packet transmitted unchanged");

    // 7. storage reuse: 40 packets of 200 bytes through a 64-segment memory
    for (int n = 0; n < 40; n++) begin
      f.delete();
      for (int i = 0; i < 200; i++) f.push_back(8'($urandom));
      give(0, f);
      wait (arrivals == 3 + n);
      command(mk(DMM_DEQUEUE, 0, 0, 0, 0, 0, 0), r);
      pkt = int'(r.data[15:0]);
      command(mk(DMM_ENQUEUE, 20, 0, pkt, 0, 0, 0), r);
      command(mk(DMM_RELEASE, 0, 0, pkt, 0, 0, 0), r);
      txq[1].delete();
      transmit(20, 1, len);
      check(txq[1] == f, $sformatf("reuse packet %0d", n));
    end
    check(rx_drops == 0, "no drops while storage is recycled");

    // 8. packet ids run out: 16 stored, the rest dropped
    for (int n = 0; n < 20; n++) begin
      f.delete();
      for (int i = 0; i < 70; i++) f.push_back(8'(n));
      give(0, f);
    end
    wait (rxl[0].size() == 0);
    repeat (20) @(posedge clk);
    check(rx_drops == 16'd4, $sformatf("drops %0d", rx_drops));
    command(mk(DMM_QLEN, 0, 0, 0, 0, 0, 0), r);
    check(r.data == 16, "16 packets queued");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
