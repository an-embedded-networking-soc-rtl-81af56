// tb_osc: self-checking test of the output scheduler.
// A DMM model keeps per-flow backlogs and answers each grant with the queue
// removal and the transmit-done report. Checked: bandwidth shares follow the
// configured weights (1:2:3), a higher-priority flow is served first, a flow
// the shaper holds back is skipped, and the scheduler keeps the link busy
// when only one flow is backlogged (work conservation).
module tb_osc;
  import gf_pkg::*;
  localparam int NF = 4, BASE = 100;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          cfg_we, enq_valid, deq_valid, port_ready, req_valid, req_ready, done_valid;
  logic [1:0]    cfg_flow;
  logic [15:0]   cfg_vstep, done_len;
  logic [1:0]    cfg_prio;
  flow_t         enq_flow, deq_flow, req_flow;
  logic [NF-1:0] conform;
  logic [31:0]   vtime;

  osc #(.NF(NF), .BASE(BASE)) dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int backlog [NF];
  int served  [NF];
  int order [$];

  task automatic cfg(input int f, input int vstep, input int prio);
    @(negedge clk);
    cfg_we = 1; cfg_flow = 2'(f); cfg_vstep = 16'(vstep); cfg_prio = 2'(prio);
    @(negedge clk) cfg_we = 0;
  endtask

  task automatic enq(input int f, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      enq_valid = 1; enq_flow = flow_t'(BASE + f);
      backlog[f]++;
      @(negedge clk) enq_valid = 0;
    end
  endtask

  // DMM model: serve a grant, report removal and completion
  initial begin
    req_ready = 0; deq_valid = 0; done_valid = 0; deq_flow = '0; done_len = '0;
    forever begin
      @(negedge clk);
      deq_valid = 0; done_valid = 0; req_ready = 0;
      if (req_valid) begin
        int f;
        f = int'(req_flow) - BASE;
        req_ready = 1;
        @(negedge clk) req_ready = 0;
        if (f < 0 || f >= NF || backlog[f] == 0) begin
          failures++; $display("grant to empty/unknown flow %0d", f);
        end else begin
          backlog[f]--; served[f]++; order.push_back(f);
        end
        repeat (3) @(negedge clk);
        deq_valid = 1; deq_flow = req_flow; done_valid = 1; done_len = 16'd100;
      end
    end
  end

  task automatic wait_served(input int n);
    int tot;
    do begin
      @(posedge clk);
      tot = 0;
      for (int i = 0; i < NF; i++) tot += served[i];
    end while (tot < n);
  endtask

  initial begin
    cfg_we = 0; enq_valid = 0; enq_flow = '0; cfg_flow = 0; cfg_vstep = 0; cfg_prio = 0;
    port_ready = 0; conform = '1;
    for (int i = 0; i < NF; i++) begin backlog[i] = 0; served[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg(0, 600, 0); cfg(1, 300, 0); cfg(2, 200, 0); cfg(3, 100, 1);
    enq(0, 60); enq(1, 60); enq(2, 60);
    port_ready = 1;
    wait_served(60);
    checks += 3;
    $display("shares %0d %0d %0d", served[0], served[1], served[2]);
    if (served[0] < 8 || served[0] > 12)  begin failures++; $display("flow0 share"); end
    if (served[1] < 18 || served[1] > 22) begin failures++; $display("flow1 share"); end
    if (served[2] < 28 || served[2] > 32) begin failures++; $display("flow2 share"); end
    // priority: flow 3 jumps ahead
    port_ready = 0;
    repeat (10) @(posedge clk);
    enq(3, 5);
    order.delete();
    port_ready = 1;
    wait_served(70);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (order[i] != 3) begin failures++; $display("priority order[%0d]=%0d", i, order[i]); end
    end
    // shaper holds flow 2 back
    conform[2] = 0;
    order.delete();
    wait_served(90);
    foreach (order[i]) begin
      checks++;
      if (order[i] == 2) begin failures++; $display("non-conforming flow served"); end
    end
    // work conservation: only flow 2 left once the others drain
    conform[2] = 1;
    while (backlog[0] + backlog[1] != 0) @(posedge clk);
    enq(2, 40);
    begin
      int t0, n0;
      n0 = served[2];
      t0 = 0;
      repeat (200) begin @(posedge clk); t0++; end
      checks++;
      if (served[2] - n0 < 200 / 10) begin failures++; $display("idle link: %0d in 200 cycles", served[2] - n0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
