// tb_dpram: self-checking test of the dual-port RAM.
// Random reads and writes on both ports are compared with a reference array;
// reads must return the word one cycle after the address (read-first).
module tb_dpram;
  localparam int unsigned WORDS = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        a_we, b_we;
  logic [5:0]  a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] ref_mem [WORDS];

  dpram #(.WORDS(WORDS), .DW(32)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_a, exp_b;
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through both ports
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      a_we = (i % 2 == 0); b_we = (i % 2 == 1);
      a_addr = 6'(i); b_addr = 6'(i);
      a_wdata = 32'hA000_0000 + 32'(i); b_wdata = 32'hB000_0000 + 32'(i);
      ref_mem[i] = (i % 2 == 0) ? a_wdata : b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int n = 0; n < 400; n++) begin
      a_addr = 6'($urandom_range(0, WORDS - 1));
      b_addr = 6'($urandom_range(0, WORDS - 1));
      a_we = ($urandom_range(0, 3) == 0);
      b_we = ($urandom_range(0, 3) == 0) && (b_addr != a_addr);
      a_wdata = $urandom; b_wdata = $urandom;
      exp_a = ref_mem[a_addr]; exp_b = ref_mem[b_addr];
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("A mismatch %h %h", a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; $display("B mismatch %h %h", b_rdata, exp_b); end
      if (a_we) ref_mem[a_addr] = a_wdata;
      if (b_we) ref_mem[b_addr] = b_wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
