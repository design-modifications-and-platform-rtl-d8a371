// tb_scratch_memory: writes random words to random addresses, reads them
// back through the separate read port with one cycle of latency, and checks
// read-before-write when a word is read and written in the same cycle.
module tb_scratch_memory;
  import dpr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   we = 1'b0;
  maddr_t waddr = '0, raddr = '0;
  mword_t wdata = '0, rdata;
  mword_t model [MEM_DEPTH];
  bit     valid [MEM_DEPTH];
  int checks = 0, failures = 0;

  scratch_memory dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                      .raddr(raddr), .rdata(rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    maddr_t a;
    mword_t old;
    // fill a set of addresses
    for (int i = 0; i < 2000; i++) begin
      a = maddr_t'($urandom);
      @(negedge clk);
      we = 1'b1; waddr = a; wdata = $urandom;
      model[a] = wdata; valid[a] = 1'b1;
    end
    @(negedge clk) we = 1'b0;
    // read back every written address
    for (int i = 0; i < MEM_DEPTH; i++) begin
      if (!valid[i]) continue;
      @(negedge clk) raddr = maddr_t'(i);
      @(posedge clk) #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("addr %0d: read %h expected %h", i, rdata, model[i]);
      end
    end
    // simultaneous read and write of one address returns the old word
    for (int i = 0; i < 200; i++) begin
      a = maddr_t'($urandom);
      @(negedge clk);
      we = 1'b1; waddr = a; raddr = a; wdata = $urandom;
      old = model[a];
      @(posedge clk) #1;
      checks++;
      if (valid[a] && rdata !== old) begin
        failures++;
        $display("read-during-write at %0d: %h expected old %h", a, rdata, old);
      end
      model[a] = wdata; valid[a] = 1'b1;
      @(negedge clk) we = 1'b0;
      @(posedge clk) #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("after write at %0d: %h expected %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
