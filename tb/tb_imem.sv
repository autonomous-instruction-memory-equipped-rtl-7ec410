// tb_imem: instruction memory. Writes random words to random addresses
// through the load port, keeps its own copy, and reads them back: the word
// must appear exactly one cycle after its address (synchronous read).
// Addresses at and beyond the last word must give rd_fault and zero data.
module tb_imem;
  import aim_pkg::*;

  localparam int unsigned WORDS = 256;

  logic   clk = 0;
  always #5 clk = ~clk;

  addr_t  rd_addr, waddr;
  instr_t rd_data, wdata;
  logic   rd_fault, we;
  int checks = 0, failures = 0;
  instr_t model [WORDS];
  bit     written [WORDS];

  imem #(.WORDS(WORDS)) dut (.clk, .rd_addr, .rd_data, .rd_fault, .we, .waddr, .wdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0; rd_addr = '0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      we = 1; waddr = addr_t'(i); wdata = $urandom;
      model[i] = wdata; written[i] = 1;
      @(negedge clk);
    end
    for (int n = 0; n < 300; n++) begin
      we = 1; waddr = addr_t'($urandom_range(WORDS-1)); wdata = $urandom;
      model[waddr] = wdata;
      @(negedge clk);
    end
    // writes beyond the memory must be ignored, not wrap
    we = 1; waddr = addr_t'(WORDS); wdata = 32'hDEAD_BEEF;
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 1000; n++) begin
      addr_t a;
      a = (n % 10 == 9) ? addr_t'(WORDS + $urandom_range(100)) : addr_t'($urandom_range(WORDS-1));
      if (n == 500) a = addr_t'(32'hFFFF_FFFF);
      rd_addr = a;
      @(posedge clk); #1;
      if (a < WORDS) begin
        check(!rd_fault, $sformatf("fault at %0h", a));
        check(rd_data == model[a], $sformatf("data at %0h: %h vs %h", a, rd_data, model[a]));
      end else begin
        check(rd_fault, $sformatf("no fault at %0h", a));
        check(rd_data == '0, "data beyond memory not zero");
      end
      @(negedge clk);
    end
    rd_addr = '0;
    @(posedge clk); #1;
    check(rd_data == model[0], "word 0 not overwritten by the write beyond the memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
