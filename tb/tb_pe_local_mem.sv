// tb_pe_local_mem: self-checking test of a PE's dual-ported local memory.
//
// Writes through one port and reads through the other, at the full 512-word
// depth, with random data kept in a reference array; checks the one-cycle
// read latency, simultaneous accesses from both ports to different words,
// and that a read without enable leaves the read data unchanged.
module tb_pe_local_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [8:0]  a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;

  pe_local_mem #(.WORDS(512)) u_dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] ref_m [512];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    // port B (host) fills even words, port A (PE) odd words, in the same cycles
    for (int i = 0; i < 256; i++) begin
      ref_m[2 * i]     = $urandom;
      ref_m[2 * i + 1] = $urandom;
      b_en = 1; b_we = 1; b_addr = 9'(2 * i);     b_wdata = ref_m[2 * i];
      a_en = 1; a_we = 1; a_addr = 9'(2 * i + 1); a_wdata = ref_m[2 * i + 1];
      @(posedge clk); #1;
    end
    a_we = 0; b_we = 0;
    // read everything back crosswise
    for (int i = 0; i < 512; i++) begin
      a_addr = 9'(i); b_addr = 9'(511 - i);
      @(posedge clk); #1;
      check(a_rdata == ref_m[i], $sformatf("port A word %0d", i));
      check(b_rdata == ref_m[511 - i], $sformatf("port B word %0d", 511 - i));
    end
    // no enable: read data holds
    a_en = 0; b_en = 0; a_addr = 9'd5; b_addr = 9'd6;
    @(posedge clk); #1;
    check(a_rdata == ref_m[511] && b_rdata == ref_m[0], "read data holds without enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
