// tb_cmd_arb: self-checking test of the round-robin command arbiter.
// Three masters issue numbered requests at random; a target model answers each
// after a random delay with data derived from the request. Every master must
// get exactly its own answers, in order, and grants must rotate.
module tb_cmd_arb;
  import gf_pkg::*;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] m_valid, m_ready, m_rsp_valid;
  dmm_cmd_t     m_req [N];
  dmm_rsp_t     m_rsp, s_rsp;
  logic         s_valid, s_ready, s_rsp_valid;
  dmm_cmd_t     s_req;

  cmd_arb #(.N(N)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // target: accepts after a random wait, answers with flow+1 later
  int busy = 0;
  dmm_cmd_t held;
  int grants [N];
  int last_master = -1;
  int rotations = 0;
  initial begin
    s_ready = 0; s_rsp_valid = 0; s_rsp = '0;
    forever begin
      @(negedge clk);
      s_rsp_valid = 0;
      if (s_valid && !busy) begin
        s_ready = ($urandom_range(0, 2) == 0);
        if (s_ready) begin held = s_req; busy = 1; end
      end else begin
        s_ready = 0;
        if (busy && $urandom_range(0, 3) == 0) begin
          busy = 0;
          s_rsp_valid = 1;
          s_rsp = '{ok: 1'b1, data: 32'(held.flow) + 32'd1};
        end
      end
    end
  end

  // masters
  int sent [N], got [N];
  for (genvar m = 0; m < N; m++) begin : g_m
    initial begin
      m_valid[m] = 0; m_req[m] = '0;
      sent[m] = 0; got[m] = 0;
      wait (rst_n);
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        m_req[m] = '0;
        m_req[m].flow = flow_t'(m * 1000 + t);
        m_valid[m] = 1;
        do @(posedge clk); while (!m_ready[m]);
        @(negedge clk) m_valid[m] = 0;
        while (!m_rsp_valid[m]) @(posedge clk);
        checks++;
        if (m_rsp.data != 32'(m * 1000 + t) + 1) begin
          failures++; $display("master %0d got %0d", m, m_rsp.data);
        end
        got[m]++;
      end
    end
  end

  // check the target sees one request at a time and count rotation
  always @(posedge clk) if (s_valid && s_ready) begin
    int who;
    who = int'(s_req.flow) / 1000;
    grants[who]++;
    if (last_master >= 0 && who != last_master) rotations++;
    last_master = who;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got[0] == 40 && got[1] == 40 && got[2] == 40);
    checks++;
    if (rotations < 60) begin failures++; $display("too few rotations %0d", rotations); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
