// tb_hbce: self-checking test of the hash based classification engine.
// Learns random {MAC, VID} keys (several sharing a vendor part), then checks
// lookups of learned and unknown keys, result updates, deletion (aging) and
// the response latency of PROBES+1 cycles, against an associative-array model.
module tb_hbce;
  localparam int ENTRIES = 256, PROBES = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        req_valid, req_ready, rsp_valid, rsp_hit, init_done;
  logic [1:0]  req_op;
  logic [47:0] req_mac;
  logic [11:0] req_vid;
  logic [15:0] req_result, rsp_result;

  hbce #(.ENTRIES(ENTRIES), .PROBES(PROBES), .VENDORS(8)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model [logic [59:0]];
  logic [47:0] macs [64];
  logic [11:0] vids [64];
  int lat;

  task automatic do_req(input logic [1:0] op, input logic [47:0] mac, input logic [11:0] vid,
                        input logic [15:0] res, output logic hit, output logic [15:0] rres);
    @(negedge clk);
    req_valid = 1; req_op = op; req_mac = mac; req_vid = vid; req_result = res;
    do @(posedge clk); while (!req_ready);
    @(negedge clk) req_valid = 0;
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!rsp_valid);
    hit = rsp_hit; rres = rsp_result;
  endtask

  initial begin
    logic hit; logic [15:0] r;
    int learn_fail = 0;
    req_valid = 0; req_op = 0; req_mac = 0; req_vid = 0; req_result = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int i = 0; i < 64; i++) begin
      macs[i] = {24'h00_1B_21 + 24'(i % 3), 24'($urandom)};
      vids[i] = 12'($urandom_range(1, 20));
      do_req(2'd1, macs[i], vids[i], 16'(i * 7 + 1), hit, r);
      if (hit) model[{vids[i], macs[i]}] = 16'(i * 7 + 1);
      else learn_fail++;
    end
    checks++;
    if (learn_fail > 2) begin failures++; $display("too many learn failures %0d", learn_fail); end
    // latency of a response: PROBES probe cycles + result cycle after the accept edge
    checks++;
    if (lat != PROBES + 1) begin failures++; $display("latency %0d", lat); end
    // lookups of learned keys
    for (int i = 0; i < 64; i++) begin
      do_req(2'd0, macs[i], vids[i], 0, hit, r);
      checks++;
      if (model.exists({vids[i], macs[i]})) begin
        if (!hit || r != model[{vids[i], macs[i]}]) begin failures++; $display("lookup %0d hit=%0d r=%0d", i, hit, r); end
      end else if (hit) begin failures++; $display("unexpected hit %0d", i); end
    end
    // same MAC, other VLAN: miss; unknown vendor: miss
    do_req(2'd0, macs[0], vids[0] + 12'd100, 0, hit, r);
    checks++; if (hit) begin failures++; $display("vid not part of key"); end
    do_req(2'd0, {24'hABCDEF, macs[0][23:0]}, vids[0], 0, hit, r);
    checks++; if (hit) begin failures++; $display("vendor not part of key"); end
    // update (station moved to another port)
    do_req(2'd1, macs[5], vids[5], 16'hBEEF, hit, r);
    model[{vids[5], macs[5]}] = 16'hBEEF;
    do_req(2'd0, macs[5], vids[5], 0, hit, r);
    checks++; if (!hit || r != 16'hBEEF) begin failures++; $display("update lost"); end
    // aging: delete half
    for (int i = 0; i < 64; i += 2) begin
      do_req(2'd2, macs[i], vids[i], 0, hit, r);
      checks++;
      if (hit != model.exists({vids[i], macs[i]})) begin failures++; $display("delete %0d", i); end
      model.delete({vids[i], macs[i]});
    end
    for (int i = 0; i < 64; i++) begin
      do_req(2'd0, macs[i], vids[i], 0, hit, r);
      checks++;
      if (hit != model.exists({vids[i], macs[i]})) begin failures++; $display("after delete %0d", i); end
      else if (hit && r != model[{vids[i], macs[i]}]) begin failures++; $display("result after delete %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
