// tb_cmm: self-checking test of the connection memory manager.
// Writes VLAN config and context records and learns MAC/VID keys, then checks
// plain reads, the one-request classification and unknown keys/VLANs.
module tb_cmm;
  import gf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     req_valid, req_ready, rsp_valid;
  cmm_req_t req;
  cmm_rsp_t rsp;
  logic     init_done;

  cmm #(.HBCE_ENTRIES(256), .HBCE_PROBES(4), .VCTX_ENTRIES(2048)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input cmm_req_t r, output cmm_rsp_t o);
    @(negedge clk);
    req_valid = 1; req = r;
    do @(posedge clk); while (!req_ready);
    @(negedge clk) req_valid = 0;
    do @(posedge clk); while (!rsp_valid);
    o = rsp;
  endtask

  function automatic vctx_t mkctx(int i);
    vctx_t x;
    x.proto  = 4'(i % 2);
    x.out_q0 = 16'(100 + i);
    x.out_q1 = 16'(200 + i);
    x.l2_hdr = {8'(i), 80'h0102030405060708090A};
    return x;
  endfunction

  initial begin
    cmm_req_t r; cmm_rsp_t o;
    req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // VLANs 10..19 -> VPLS index 500+i
    for (int i = 0; i < 10; i++) begin
      r = '0; r.op = CMM_VCFG_WR; r.vid = 12'(10 + i); r.vidx = VIDX_W'(500 + i);
      issue(r, o);
      r = '0; r.op = CMM_VCTX_WR; r.vidx = VIDX_W'(500 + i); r.ctx = mkctx(i);
      issue(r, o);
    end
    for (int i = 0; i < 10; i++) begin
      r = '0; r.op = CMM_LEARN; r.mac = 48'h0050_C200_0000 + 48'(i); r.vid = 12'(10 + i); r.result = 16'(7 * i);
      issue(r, o);
      checks++; if (!o.hit) begin failures++; $display("learn %0d", i); end
    end
    for (int i = 0; i < 10; i++) begin
      r = '0; r.op = CMM_VCFG_RD; r.vid = 12'(10 + i);
      issue(r, o);
      checks++; if (!o.vlan_ok || o.vidx != VIDX_W'(500 + i)) begin failures++; $display("vcfg %0d", i); end
      r = '0; r.op = CMM_VCTX_RD; r.vidx = VIDX_W'(500 + i);
      issue(r, o);
      checks++; if (o.ctx != mkctx(i)) begin failures++; $display("vctx %0d", i); end
      r = '0; r.op = CMM_CLASSIFY; r.mac = 48'h0050_C200_0000 + 48'(i); r.vid = 12'(10 + i);
      issue(r, o);
      checks++;
      if (!o.hit || o.result != 16'(7 * i) || !o.vlan_ok || o.vidx != VIDX_W'(500 + i) || o.ctx != mkctx(i)) begin
        failures++; $display("classify %0d", i);
      end
    end
    // unknown MAC on a known VLAN, and an unconfigured VLAN
    r = '0; r.op = CMM_CLASSIFY; r.mac = 48'h0050_C2FF_FFFF; r.vid = 12'd12;
    issue(r, o);
    checks++; if (o.hit || !o.vlan_ok || o.ctx != mkctx(2)) begin failures++; $display("unknown mac"); end
    r = '0; r.op = CMM_VCFG_RD; r.vid = 12'd3000;
    issue(r, o);
    checks++; if (o.vlan_ok) begin failures++; $display("unconfigured vlan valid"); end
    r = '0; r.op = CMM_CLASSIFY; r.mac = 48'h0050_C200_0001; r.vid = 12'd3000;
    issue(r, o);
    checks++; if (o.vlan_ok) begin failures++; $display("classify on unconfigured vlan valid"); end
    // aging
    r = '0; r.op = CMM_DELETE; r.mac = 48'h0050_C200_0003; r.vid = 12'd13;
    issue(r, o);
    r.op = CMM_LOOKUP;
    issue(r, o);
    checks++; if (o.hit) begin failures++; $display("delete failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
