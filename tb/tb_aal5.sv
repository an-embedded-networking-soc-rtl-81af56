// tb_aal5: self-checking test of the ATM port, aal5_tx looped back into
// aal5_rx, plus cells built here and driven straight into aal5_rx.
//
// Loopback: frames of several lengths (including ones that put the trailer
// alone into an extra cell) are pushed into aal5_tx with 1..4 bytes per word
// while the PHY's tx_clav toggles at random. A monitor on the cell stream
// checks every cell independently of the RTL: the HEC (CRC-8 computed here
// bit by bit), VPI/VCI, PTI end-of-PDU bit only on the last cell, the pad,
// the zero fill, the trailer length and the CRC-32 (computed here bit by bit)
// and the carried frame bytes. Frames read back from aal5_rx must match.
//
// Direct drive: a PDU built here with a cell of another circuit interleaved
// must be received; a cell with a bad HEC and one of another circuit must be
// counted in cells_dropped; a PDU with a wrong CRC and one whose length field
// disagrees with its cell count must be dropped.
module tb_aal5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [7:0]  VPI = 8'd5;
  localparam logic [15:0] VCI = 16'd100;

  logic        push_valid = 0, push_last = 0;
  logic [31:0] push_data = '0;
  logic [2:0]  push_nb = '0;
  logic [10:0] space;
  logic        tx_clav = 0, tx_enb_n, tx_soc;
  logic [7:0]  tx_data;
  logic [15:0] sent;

  logic        inj = 0, inj_clav = 0, inj_soc = 0;
  logic [7:0]  inj_data = '0;
  logic        rx_enb_n, frm_avail, frm_pop = 0;
  logic [15:0] frm_len, frames_ok, drops, cells_dropped;
  logic [9:0]  rd_idx = '0;
  logic [31:0] rd_data;

  aal5_tx #(.VPI(VPI), .VCI(VCI)) u_tx (
    .clk, .rst_n, .push_valid, .push_data, .push_nb, .push_last, .space,
    .tx_clav, .tx_enb_n, .tx_soc, .tx_data, .sent);

  aal5_rx #(.VPI(VPI), .VCI(VCI)) u_rx (
    .clk, .rst_n,
    .rx_clav(inj ? inj_clav : !tx_enb_n), .rx_enb_n,
    .rx_soc(inj ? inj_soc : tx_soc), .rx_data(inj ? inj_data : tx_data),
    .frm_avail, .frm_len, .rd_idx, .rd_data, .frm_pop, .frames_ok, .drops, .cells_dropped);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference CRCs, bit serial ----------------
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

  function automatic logic [31:0] crc_ref(input logic [7:0] b [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) for (int j = 7; j >= 0; j--) begin
      logic fb;
      fb = c[31] ^ b[i][j];
      c = {c[30:0], 1'b0};
      if (fb) c = c ^ 32'h04C1_1DB7;
    end
    return ~c;
  endfunction

  typedef logic [7:0] bytes_t [$];

  // cells for one frame: a PDU with pad, fill and trailer; bad_crc flips a CRC
  // bit, extra_cell adds one more cell of zero fill (length no longer fits)
  function automatic bytes_t build_cells(input bytes_t f, input logic [15:0] vci,
                                         input bit bad_crc, input bit extra_cell);
    bytes_t pdu, cells;
    int n;
    logic [31:0] crc;
    pdu = {8'h00, 8'h00};
    foreach (f[i]) pdu.push_back(f[i]);
    n = (pdu.size() + 8 + 47) / 48 + (extra_cell ? 1 : 0);
    while (pdu.size() < n * 48 - 8) pdu.push_back(8'h00);
    pdu.push_back(8'h00); pdu.push_back(8'h00);
    pdu.push_back(8'((f.size() + 2) >> 8)); pdu.push_back(8'(f.size() + 2));
    crc = crc_ref(pdu);
    if (bad_crc) crc[3] = ~crc[3];
    for (int i = 3; i >= 0; i--) pdu.push_back(crc[8*i +: 8]);
    for (int c = 0; c < n; c++) begin
      logic [7:0] h [4];
      h[0] = {4'h0, VPI[7:4]};
      h[1] = {VPI[3:0], vci[15:12]};
      h[2] = vci[11:4];
      h[3] = {vci[3:0], 2'b00, c == n - 1, 1'b0};
      for (int i = 0; i < 4; i++) cells.push_back(h[i]);
      cells.push_back(hec_ref(h));
      for (int i = 0; i < 48; i++) cells.push_back(pdu[c*48 + i]);
    end
    return cells;
  endfunction

  // ---------------- loopback traffic ----------------
  bytes_t mon_exp [$];    // frames the cell monitor expects
  bytes_t rx_exp  [$];    // frames aal5_rx must deliver

  task automatic push_frame(input int len, input int split);
    bytes_t b;
    int i;
    for (int n = 0; n < len; n++) b.push_back(8'($urandom));
    mon_exp.push_back(b);
    rx_exp.push_back(b);
    i = 0;
    while (i < len) begin
      int nb;
      nb = (i < split) ? ((split - i) < 4 ? split - i : 4) : ((len - i) < 4 ? len - i : 4);
      @(negedge clk);
      push_valid = 1; push_nb = 3'(nb); push_last = (i + nb == len);
      push_data = '0;
      for (int j = 0; j < nb; j++) push_data[31 - 8*j -: 8] = b[i + j];
      i += nb;
    end
    @(negedge clk) push_valid = 0;
  endtask

  // random cell-available from the PHY
  always @(negedge clk) if (!inj) tx_clav <= ($urandom % 4) != 0;

  // cell monitor on the transmit line
  int     mon_pdus = 0, mon_cells = 0;
  bytes_t cbuf, pdu_acc;
  always @(posedge clk) if (rst_n && !tx_enb_n) begin
    if (tx_soc) begin
      check(cbuf.size() == 0 || cbuf.size() == 53, "cell length");
      cbuf = {};
    end
    cbuf.push_back(tx_data);
    if (cbuf.size() == 53) begin
      logic [7:0] h [4];
      for (int i = 0; i < 4; i++) h[i] = cbuf[i];
      mon_cells++;
      check(cbuf[4] == hec_ref(h), "HEC");
      check({h[0][3:0], h[1][7:4]} == VPI && {h[1][3:0], h[2], h[3][7:4]} == VCI, "VPI/VCI");
      for (int i = 5; i < 53; i++) pdu_acc.push_back(cbuf[i]);
      if (h[3][1]) begin
        automatic bytes_t f = {}, body = {};
        int l;
        mon_pdus++;
        f = mon_exp.pop_front();
        l = {pdu_acc[pdu_acc.size() - 6], pdu_acc[pdu_acc.size() - 5]};
        check(l == f.size() + 2, $sformatf("trailer length %0d for frame %0d", l, f.size()));
        check(pdu_acc.size() == (f.size() + 10 + 47) / 48 * 48, "PDU cell count");
        check(pdu_acc[0] == 0 && pdu_acc[1] == 0, "pad");
        for (int i = 0; i < pdu_acc.size() - 4; i++) body.push_back(pdu_acc[i]);
        check(crc_ref(body) == {pdu_acc[pdu_acc.size() - 4], pdu_acc[pdu_acc.size() - 3],
                                pdu_acc[pdu_acc.size() - 2], pdu_acc[pdu_acc.size() - 1]}, "CRC-32");
        begin
          automatic bit ok = 1;
          foreach (f[i]) if (pdu_acc[2 + i] != f[i]) ok = 0;
          for (int i = f.size() + 2; i < pdu_acc.size() - 8; i++) if (pdu_acc[i] != 0) ok = 0;
          check(ok, "frame bytes and zero fill");
        end
        pdu_acc = {};
      end
      cbuf = {};
    end
  end

  // reader of aal5_rx
  int got = 0;
  task automatic read_frame();
    bytes_t f;
    bit ok;
    wait (frm_avail);
    @(negedge clk);
    f = rx_exp.pop_front();
    check(frm_len == f.size(), $sformatf("rx length %0d expected %0d", frm_len, f.size()));
    ok = 1;
    for (int i = 0; i < (f.size() + 3) / 4; i++) begin
      @(negedge clk) rd_idx = 10'(i);
      @(posedge clk);
      for (int j = 0; j < 4 && 4*i + j < f.size(); j++)
        if (rd_data[31 - 8*j -: 8] != f[4*i + j]) ok = 0;
    end
    check(ok, "rx frame bytes");
    @(negedge clk) frm_pop = 1;
    @(negedge clk) frm_pop = 0;
    got++;
  endtask

  task automatic send_cells(input bytes_t c);
    foreach (c[i]) begin
      @(negedge clk);
      inj_clav = 1; inj_soc = (i % 53) == 0; inj_data = c[i];
      if (i % 53 == 52) begin
        @(negedge clk) inj_clav = 0;
      end
    end
    @(negedge clk) inj_clav = 0; inj_soc = 0;
  endtask

  int lens [8] = '{60, 86, 87, 100, 134, 135, 1514, 61};
  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    fork
      foreach (lens[i]) push_frame(lens[i], (i % 3) + 1);
      repeat (8) read_frame();
    join
    wait (mon_pdus == 8);
    repeat (20) @(negedge clk);
    check(sent == 8, "tx PDU count");
    check(frames_ok == 8 && drops == 0 && cells_dropped == 0, "rx counters after loopback");
    check(mon_exp.size() == 0, "all frames seen on the line");

    // ---------------- direct drive ----------------
    inj = 1;
    tx_clav = 0;
    begin
      bytes_t f, c, other, good;
      for (int n = 0; n < 120; n++) f.push_back(8'($urandom));
      c = build_cells(f, VCI, 0, 0);
      other = build_cells(f, VCI + 1, 0, 0);
      // another circuit's cbuf between the first and second cbuf of the PDU
      for (int i = 0; i < 53; i++) good.push_back(c[i]);
      for (int i = 0; i < 53; i++) good.push_back(other[i]);
      for (int i = 53; i < c.size(); i++) good.push_back(c[i]);
      rx_exp.push_back(f);
      send_cells(good);
      read_frame();
      check(frames_ok == 9 && cells_dropped == 1, "interleaved foreign cbuf ignored");

      // bad HEC on a single cbuf
      c = build_cells(f, VCI, 0, 0);
      c[4] = c[4] ^ 8'h01;
      send_cells(c[0:52]);
      check(cells_dropped == 2 && drops == 0, "bad HEC cbuf dropped");
      // the rest of that PDU is now a PDU missing its first cbuf: length mismatch
      send_cells(c[53:$]);
      repeat (3) @(negedge clk);
      check(drops == 1 && frames_ok == 9, "PDU missing a cbuf dropped");

      c = build_cells(f, VCI, 1, 0);
      send_cells(c);
      repeat (3) @(negedge clk);
      check(drops == 2 && frames_ok == 9, "bad CRC PDU dropped");

      c = build_cells(f, VCI, 0, 1);
      send_cells(c);
      repeat (3) @(negedge clk);
      check(drops == 3 && frames_ok == 9, "length/cbuf count mismatch dropped");

      // still receiving after the errors
      f = {};
      for (int n = 0; n < 64; n++) f.push_back(8'($urandom));
      rx_exp.push_back(f);
      send_cells(build_cells(f, VCI, 0, 0));
      read_frame();
      check(frames_ok == 10 && frm_avail == 0, "good PDU after errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
