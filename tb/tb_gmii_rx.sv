// tb_gmii_rx: self-checking test of the Ethernet receive MAC.
// Sends frames on GMII with preamble, SFD and an FCS computed here, bit by
// bit: good frames of several lengths (one at half rate through the byte
// strobe), a frame with a wrong FCS, a runt and a frame with rx_er. Good
// frames must come out of the buffer with the right length and big-endian
// words; the others must be counted as drops.
module tb_gmii_rx;
  import gf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        ce, rx_dv, rx_er, frm_avail, frm_pop;
  logic [7:0]  rxd;
  len_t        frm_len;
  logic [9:0]  rd_idx;
  logic [31:0] rd_data;
  logic [15:0] frames_ok, drops;

  gmii_rx #(.BUF_WORDS(1024)) dut (.*);

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

  logic [7:0] expq [$][$];   // frames expected out
  int n_good = 0;

  task automatic send(input int len, input bit bad_fcs, input bit err, input int slow);
    logic [7:0] b [$];
    logic [31:0] f;
    for (int i = 0; i < len; i++) b.push_back(8'($urandom));
    f = fcs_of(b);
    if (bad_fcs) f = f ^ 32'h1;
    if (!bad_fcs && !err && len + 4 >= 64) begin expq.push_back(b); n_good++; end
    for (int i = 0; i < 4; i++) b.push_back(f[8*i +: 8]);
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); ce = 1; rx_dv = 1; rxd = 8'h55;
      repeat (slow) begin @(negedge clk); ce = 0; end
    end
    @(negedge clk); ce = 1; rxd = 8'hD5;
    repeat (slow) begin @(negedge clk); ce = 0; end
    foreach (b[i]) begin
      @(negedge clk); ce = 1; rxd = b[i]; rx_er = err && (i == 10);
      repeat (slow) begin @(negedge clk); ce = 0; end
    end
    @(negedge clk); ce = 1; rx_dv = 0; rx_er = 0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    ce = 1; rx_dv = 0; rx_er = 0; rxd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(60, 0, 0, 0);
    send(100, 0, 0, 0);
    send(100, 1, 0, 0);   // bad FCS
    send(40, 0, 0, 0);    // runt
    send(80, 0, 1, 0);    // rx_er
    send(1500, 0, 0, 0);
    send(77, 0, 0, 1);    // half-rate strobe (MII speed)
    checks += 2;
    if (frames_ok != 16'(n_good)) begin failures++; $display("frames_ok=%0d", frames_ok); end
    if (drops != 16'd3) begin failures++; $display("drops=%0d", drops); end
  end

  // reader
  initial begin
    frm_pop = 0; rd_idx = 0;
    wait (rst_n);
    repeat (4) begin
      logic [7:0] b [$];
      wait (frm_avail && expq.size() != 0);
      @(negedge clk);
      b = expq.pop_front();
      checks++;
      if (frm_len != 16'(b.size())) begin failures++; $display("len %0d exp %0d", frm_len, b.size()); end
      for (int w = 0; w < (b.size() + 3) / 4; w++) begin
        rd_idx = 10'(w); #1;
        for (int j = 0; j < 4; j++) if (4 * w + j < b.size()) begin
          checks++;
          if (rd_data[31 - 8*j -: 8] != b[4*w + j]) begin failures++; $display("byte %0d", 4*w+j); end
        end
      end
      @(negedge clk) frm_pop = 1;
      @(negedge clk) frm_pop = 0;
    end
    wait (expq.size() == 0 && !frm_avail);
    repeat (50) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
