// tb_mii_adapt: self-checking test of the MII nibble adapter.
// Receive: random bytes sent as nibble pairs (low first) at one nibble per
// 4 clocks must come out as the same bytes with rx_dv, rx_er marking the
// byte whose nibble had rx_er, and an idle strobe after the frame.
// Transmit: a byte source advanced by tx_ce must appear on the MII pins as
// low nibble then high nibble, with tx_en.
module tb_mii_adapt;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       mii_ce, mii_rx_dv, mii_rx_er, rx_ce, rx_dv, rx_er, tx_ce, tx_en, mii_tx_en;
  logic [3:0] mii_rxd, mii_txd;
  logic [7:0] rxd, txd;

  mii_adapt dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // MII clock enable: one core cycle in four
  int phase = 0;
  always @(negedge clk) begin
    mii_ce = (phase == 0);
    phase = (phase + 1) % 4;
  end

  logic [7:0] rx_bytes [$];
  logic [7:0] rx_got   [$];
  bit         er_got   [$];
  int         idle_seen = 0;
  always @(posedge clk) if (rst_n && rx_ce) begin
    if (rx_dv) begin rx_got.push_back(rxd); er_got.push_back(rx_er); end
    else idle_seen++;
  end

  // transmit byte source
  logic [7:0] tx_src [$];
  logic [3:0] nib_got [$];
  int tx_i = 0;
  always @(posedge clk) if (rst_n && tx_ce) begin
    tx_i++;
  end
  always_comb begin
    tx_en = (tx_i < tx_src.size());
    txd   = tx_en ? tx_src[tx_i] : 8'h00;
  end
  always @(posedge clk) if (rst_n && mii_ce && mii_tx_en) nib_got.push_back(mii_txd);

  initial begin
    mii_rx_dv = 0; mii_rx_er = 0; mii_rxd = 0;
    for (int i = 0; i < 40; i++) tx_src.push_back(8'($urandom));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // receive a frame of 30 bytes
    for (int i = 0; i < 30; i++) rx_bytes.push_back(8'($urandom));
    foreach (rx_bytes[i]) for (int h = 0; h < 2; h++) begin
      @(negedge clk); while (phase != 0) @(negedge clk);
      mii_rx_dv = 1; mii_rxd = h ? rx_bytes[i][7:4] : rx_bytes[i][3:0];
      mii_rx_er = (i == 7 && h == 1);
    end
    @(negedge clk); while (phase != 0) @(negedge clk);
    mii_rx_dv = 0; mii_rx_er = 0;
    repeat (400) @(posedge clk);
    checks++;
    if (rx_got.size() != rx_bytes.size()) begin failures++; $display("rx count %0d", rx_got.size()); end
    else foreach (rx_bytes[i]) begin
      checks += 2;
      if (rx_got[i] != rx_bytes[i]) begin failures++; $display("rx byte %0d", i); end
      if (er_got[i] != (i == 7)) begin failures++; $display("rx_er byte %0d", i); end
    end
    checks++;
    if (idle_seen == 0) begin failures++; $display("no end-of-frame strobe"); end
    // transmit check
    checks++;
    if (nib_got.size() < 2 * tx_src.size()) begin failures++; $display("tx nibbles %0d", nib_got.size()); end
    else foreach (tx_src[i]) begin
      checks++;
      if ({nib_got[2*i+1], nib_got[2*i]} != tx_src[i]) begin failures++; $display("tx byte %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
