// tb_tsh: self-checking test of the leaky-bucket traffic shaper.
// Flow 0 leaks 1 byte/cycle with a 100-byte depth: after a 300-byte packet it
// must stay non-conforming for 200 cycles (to within 2) and then conform.
// Flow 1 leaks 0.5 byte/cycle: after a 100-byte packet with depth 40 it waits
// 120 cycles. Flow 2 is unshaped and must always conform. The measured long
// run rate of a greedy sender on flow 0 must match the configured rate.
module tb_tsh;
  localparam int NF = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          cfg_we, done_valid;
  logic [1:0]    cfg_flow, done_flow;
  logic [15:0]   cfg_rate, cfg_depth, done_len;
  logic [NF-1:0] conform;

  tsh #(.NF(NF)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input int f, input int rate, input int depth);
    @(negedge clk);
    cfg_we = 1; cfg_flow = 2'(f); cfg_rate = 16'(rate); cfg_depth = 16'(depth);
    @(negedge clk) cfg_we = 0;
  endtask

  task automatic send(input int f, input int len);
    @(negedge clk);
    done_valid = 1; done_flow = 2'(f); done_len = 16'(len);
    @(negedge clk) done_valid = 0;
  endtask

  task automatic wait_conform(input int f, input int expect_cycles);
    int n = 0;
    while (!conform[f]) begin @(posedge clk); #1; n++; end
    checks++;
    if (n < expect_cycles - 2 || n > expect_cycles + 2) begin
      failures++; $display("flow %0d conformed after %0d cycles, expected %0d", f, n, expect_cycles);
    end
  endtask

  initial begin
    int sent_bytes, cyc;
    cfg_we = 0; done_valid = 0; cfg_flow = 0; cfg_rate = 0; cfg_depth = 0; done_flow = 0; done_len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++; if (conform != '1) begin failures++; $display("not all conform after reset"); end
    cfg(0, 256, 100);
    cfg(1, 128, 40);
    send(0, 300);
    #1 checks++; if (conform[0]) begin failures++; $display("flow 0 conforms right after burst"); end
    checks++; if (!conform[2]) begin failures++; $display("unshaped flow blocked"); end
    wait_conform(0, 199);
    send(1, 100);
    wait_conform(1, 119);
    // greedy sender: 64-byte packets whenever allowed, over 4000 cycles
    sent_bytes = 0;
    for (cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      done_valid = conform[0]; done_flow = 2'd0; done_len = 16'd64;
      if (conform[0]) sent_bytes += 64;
      checks++;
      if (!conform[2]) begin failures++; $display("unshaped flow blocked"); end
    end
    done_valid = 0;
    checks++;
    if (sent_bytes < 4000 - 64 || sent_bytes > 4000 + 100 + 64 * 2) begin
      failures++; $display("greedy rate %0d bytes in 4000 cycles", sent_bytes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
