// tb_gmii_tx: self-checking test of the Ethernet transmit MAC.
// Pushes frames as words with 1..4 valid bytes each (as the DMM does when it
// joins a rewritten header to the payload), including a short frame that
// needs padding, and decodes the GMII output here: 7 preamble bytes, SFD,
// the frame bytes, zero padding to 60 bytes, the FCS (computed here bit by
// bit) and at least 12 idle byte times between frames.
module tb_gmii_tx;
  import gf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        ce, push_valid, push_last, tx_en, tx_er;
  logic [31:0] push_data;
  logic [2:0]  push_nb;
  logic [10:0] space;
  logic [7:0]  txd;
  logic [15:0] sent;

  gmii_tx #(.BUF_WORDS(1024)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] fcs_of(input logic [7:0] b [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) for (int j = 0; j < 8; j++) begin
      logic fb;
      fb = c[0] ^ b[i][j];
      c = {1'b0, c[31:1]};
      if (fb) c = c ^ 32'hEDB8_8320;
    end
    return ~c;
  endfunction

  logic [7:0] expq [$][$];
  int nframes = 4;

  task automatic push_frame(input int len, input int split);
    logic [7:0] b [$];
    int i;
    for (int n = 0; n < len; n++) b.push_back(8'($urandom));
    expq.push_back(b);
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

  initial begin
    ce = 1; push_valid = 0; push_data = 0; push_nb = 0; push_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    push_frame(100, 22);   // 22-byte header word-unaligned against the body
    push_frame(20, 3);     // short: padded
    push_frame(64, 64);
    push_frame(301, 7);
  end

  // line monitor
  initial begin
    int idle;
    idle = 100;
    wait (rst_n);
    for (int fr = 0; fr < nframes; fr++) begin
      logic [7:0] got [$];
      logic [7:0] exp [$];
      logic [7:0] body [$];
      logic [31:0] f;
      got.delete();
      while (!tx_en) begin @(posedge clk); #1; idle++; end
      checks++;
      if (fr > 0 && idle < 12) begin failures++; $display("gap %0d", idle); end
      while (tx_en) begin got.push_back(txd); @(posedge clk); #1; end
      idle = 1;
      exp = expq.pop_front();
      body = exp;
      while (body.size() < 60) body.push_back(8'h00);
      f = fcs_of(body);
      checks++;
      if (got.size() != 8 + body.size() + 4) begin failures++; $display("frame %0d size %0d", fr, got.size()); end
      else begin
        for (int i = 0; i < 7; i++) if (got[i] != 8'h55) begin failures++; $display("preamble"); end
        if (got[7] != 8'hD5) begin failures++; $display("sfd"); end
        foreach (body[i]) begin
          checks++;
          if (got[8 + i] != body[i]) begin failures++; $display("frame %0d byte %0d %h/%h", fr, i, got[8+i], body[i]); end
        end
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (got[8 + body.size() + i] != f[8*i +: 8]) begin failures++; $display("fcs byte %0d", i); end
        end
      end
    end
    checks++;
    if (sent != 16'(nframes)) begin failures++; $display("sent=%0d", sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
