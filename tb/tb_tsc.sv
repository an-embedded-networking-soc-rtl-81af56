// tb_tsc: self-checking test of the task scheduler.
// A DMM model answers FETCH commands and checks their fields (header size,
// DP-RAM buffer address of the slot); a PPU model finishes tasks in order
// after a random time. Checked: every arrival is dispatched exactly once with
// the right packet, a PPU never holds more than SLOTS tasks, both PPUs get
// work, priority weights 8:1 shape the dispatch order, the low priority is not
// starved, and arrivals beyond the FIFO depth are counted as overflow.
module tb_tsc;
  import gf_pkg::*;
  localparam int NPPU = 2, NPRIO = 4, DEPTH = 64, SLOTS = 2, SLOT_WORDS = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            arr_valid, cfg_we, cmd_valid, cmd_ready, rsp_valid;
  flow_t           arr_flow, task_flow;
  logic [1:0]      arr_prio, cfg_prio;
  logic [3:0]      cfg_weight;
  dmm_cmd_t        cmd;
  dmm_rsp_t        rsp;
  logic [NPPU-1:0] ppu_done, task_valid;
  pktid_t          task_pkt;
  len_t            task_len;
  logic            task_slot;
  logic [15:0]     ovf;

  tsc #(.NPPU(NPPU), .NPRIO(NPRIO), .DEPTH(DEPTH), .SLOTS(SLOTS), .SLOT_WORDS(SLOT_WORDS),
        .HDR_BYTES(64)) dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit   dmm_hold = 0;
  int   dispatched [int];
  int   seq [$];
  int   exp_slot [NPPU];
  int   outstanding [NPPU];
  int   per_ppu [NPPU];
  int   pending_done [NPPU][$];

  // DMM model
  initial begin
    cmd_ready = 0; rsp_valid = 0; rsp = '0;
    for (int k = 0; k < NPPU; k++) exp_slot[k] = 0;
    forever begin
      @(negedge clk);
      rsp_valid = 0;
      if (cmd_valid && !dmm_hold && $urandom_range(0, 1) == 0) begin
        dmm_cmd_t c;
        cmd_ready = 1; c = cmd;
        @(negedge clk) cmd_ready = 0;
        checks++;
        if (c.op != DMM_FETCH || c.nbytes != 11'd64 ||
            c.dp_base != DPA_W'(exp_slot[c.ppu] * SLOT_WORDS)) begin
          failures++; $display("bad command op=%0d nbytes=%0d base=%0d", c.op, c.nbytes, c.dp_base);
        end
        exp_slot[c.ppu] = (exp_slot[c.ppu] + 1) % SLOTS;
        repeat ($urandom_range(0, 4)) @(negedge clk);
        rsp_valid = 1;
        rsp = '{ok: 1'b1, data: {16'(int'(c.flow) % 1000 + 60), 16'(c.flow)}};
      end
    end
  end

  // PPU models
  always @(posedge clk) begin
    for (int k = 0; k < NPPU; k++) if (rst_n && task_valid[k]) begin
      int f;
      f = int'(task_flow);
      checks++;
      if (task_pkt != 16'(f) || task_len != 16'(f % 1000 + 60)) begin
        failures++; $display("task fields wrong");
      end
      if (dispatched.exists(f)) begin failures++; $display("flow %0d dispatched twice", f); end
      dispatched[f] = 1;
      seq.push_back(f);
      outstanding[k]++;
      per_ppu[k]++;
      checks++;
      if (outstanding[k] > SLOTS) begin failures++; $display("ppu %0d over-committed t=%0t outst_dut=%0d", k, $time, dut.outst[k]); end
      pending_done[k].push_back($urandom_range(20, 60));
    end
  end
  for (genvar k = 0; k < NPPU; k++) begin : g_ppu
    initial begin
      ppu_done[k] = 0;
      outstanding[k] = 0; per_ppu[k] = 0;
      forever begin
        @(negedge clk);
        ppu_done[k] = 0;
        if (pending_done[k].size() != 0) begin
          int t;
          t = pending_done[k].pop_front();
          repeat (t) @(negedge clk);
          ppu_done[k] = 1;
          outstanding[k]--;
        end
      end
    end
  end

  task automatic arrive(input int f, input int p);
    @(negedge clk);
    arr_valid = 1; arr_flow = flow_t'(f); arr_prio = 2'(p);
    @(negedge clk) arr_valid = 0;
  endtask

  initial begin
    int hi;
    arr_valid = 0; arr_flow = '0; arr_prio = 0; cfg_we = 0; cfg_prio = 0; cfg_weight = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    dmm_hold = 1;
    for (int i = 0; i < 40; i++) begin arrive(i, 0); arrive(1000 + i, 3); end
    dmm_hold = 0;
    wait (seq.size() == 80);
    hi = 0;
    for (int i = 0; i < 36; i++) if (seq[i] >= 1000) hi++;
    checks += 3;
    $display("high-priority share of first 36: %0d", hi);
    if (hi < 30 || hi > 34) begin failures++; $display("weights not applied"); end
    if (per_ppu[0] < 25 || per_ppu[1] < 25) begin failures++; $display("unbalanced %0d %0d", per_ppu[0], per_ppu[1]); end
    if (dispatched.size() != 80) begin failures++; $display("lost requests"); end
    // overflow
    dmm_hold = 1;
    for (int i = 0; i < DEPTH + 6; i++) arrive(2000 + i, 1);
    checks++;
    if (ovf != 16'd5) begin failures++; $display("ovf=%0d", ovf); end
    dmm_hold = 0;
    wait (seq.size() == 80 + DEPTH + 1);
    repeat (200) @(posedge clk);
    checks++;
    if (seq.size() != 80 + DEPTH + 1) begin failures++; $display("extra dispatches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
