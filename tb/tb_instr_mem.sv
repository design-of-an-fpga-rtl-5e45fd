// tb_instr_mem: self-checking test of the dual-ported instruction memory.
//
// The host port writes a program of random words; the sequencer port reads
// it back in order, one clock of latency, while the host port reads other
// words at the same time. Also checks that the sequencer port follows a new
// address every cycle and that a host write is visible to it one cycle later.
module tb_instr_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        a_en = 0, a_we = 0;
  logic [8:0]  a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata, b_rdata;

  instr_mem #(.WORDS(512)) u_dut (.*);

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
    for (int i = 0; i < 512; i++) begin
      ref_m[i] = $urandom;
      a_en = 1; a_we = 1; a_addr = 9'(i); a_wdata = ref_m[i];
      @(posedge clk); #1;
    end
    a_we = 0;
    for (int i = 0; i < 512; i++) begin
      b_addr = 9'(i); a_addr = 9'((i * 7) % 512);
      @(posedge clk); #1;
      check(b_rdata == ref_m[i], $sformatf("sequencer read word %0d", i));
      check(a_rdata == ref_m[(i * 7) % 512], $sformatf("host read word %0d", (i * 7) % 512));
    end
    // write then fetch
    a_we = 1; a_addr = 9'd3; a_wdata = 32'h1C07_5000; b_addr = 9'd3;
    @(posedge clk); #1;
    a_we = 0; a_en = 0;
    @(posedge clk); #1;
    check(b_rdata == 32'h1C07_5000, "host write seen by the sequencer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
