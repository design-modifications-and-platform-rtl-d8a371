// tb_constant_memory: loads a table through the single port, then reads it
// back (one cycle of latency) and checks that a write returns the old word.
module tb_constant_memory;
  import dpr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   we = 1'b0;
  maddr_t addr = '0;
  mword_t wdata = '0, rdata;
  int checks = 0, failures = 0;

  constant_memory dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  function automatic mword_t table_word(int i);
    return mword_t'(i * 32'h9E37_79B9) ^ mword_t'(i);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < MEM_DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; addr = maddr_t'(i); wdata = table_word(i);
    end
    @(negedge clk) we = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int i;
      i = $urandom_range(0, MEM_DEPTH - 1);
      @(negedge clk) addr = maddr_t'(i);
      @(posedge clk) #1;
      checks++;
      if (rdata !== table_word(i)) begin
        failures++;
        $display("addr %0d: %h expected %h", i, rdata, table_word(i));
      end
    end
    // write returns the old word, the new word is read next time
    @(negedge clk); we = 1'b1; addr = 12'd77; wdata = 32'hDEAD_BEEF;
    @(posedge clk) #1;
    checks++;
    if (rdata !== table_word(77)) begin failures++; $display("write did not return old word"); end
    @(negedge clk) we = 1'b0;
    @(posedge clk) #1;
    checks++;
    if (rdata !== 32'hDEAD_BEEF) begin failures++; $display("written word not read back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
