// tb_scratch_mem_ctrl: scratch memory controller with a scratch memory.
// Checks host writes and reads while the decoder is idle (acknowledged one
// cycle after the request is granted), that a host request is held off for
// as long as the decoder is busy, and that decoder accesses go straight to
// the memory with one cycle of read latency.
module tb_scratch_mem_ctrl;
  import dpr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   dec_busy = 1'b0, dec_we = 1'b0;
  maddr_t dec_raddr = '0, dec_waddr = '0;
  mword_t dec_wdata = '0, dec_rdata;
  logic   host_req = 1'b0, host_we = 1'b0, host_ack;
  maddr_t host_addr = '0;
  mword_t host_wdata = '0, host_rdata;
  logic   mem_we;
  maddr_t mem_waddr, mem_raddr;
  mword_t mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  scratch_mem_ctrl dut (.*);
  scratch_memory u_mem (.clk(clk), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                        .raddr(mem_raddr), .rdata(mem_rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_access(input logic w, input maddr_t a, input mword_t d,
                             output mword_t q, output int waited);
    @(negedge clk);
    host_req = 1'b1; host_we = w; host_addr = a; host_wdata = d;
    waited = 0;
    forever begin
      @(posedge clk) #1;
      if (host_ack) break;
      waited++;
    end
    q = host_rdata;
    @(negedge clk) host_req = 1'b0;
  endtask

  mword_t model [MEM_DEPTH];

  initial begin
    mword_t q;
    int w;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // host writes and reads, decoder idle
    for (int i = 0; i < 200; i++) begin
      maddr_t a;
      a = maddr_t'(i * 17);
      model[a] = $urandom;
      host_access(1'b1, a, model[a], q, w);
      checks++;
      if (w != 0) begin failures++; $display("idle host write took %0d wait cycles", w); end
    end
    for (int i = 0; i < 200; i++) begin
      maddr_t a;
      a = maddr_t'(i * 17);
      host_access(1'b0, a, '0, q, w);
      checks++;
      if (q !== model[a] || w != 0) begin
        failures++;
        $display("host read %0d: %h (expected %h), %0d waits", a, q, model[a], w);
      end
    end
    // decoder busy: host held off; decoder reads and writes directly
    @(negedge clk) dec_busy = 1'b1;
    fork
      begin
        host_access(1'b0, 12'd17, '0, q, w);
      end
      begin
        for (int i = 0; i < 30; i++) begin
          @(negedge clk);
          dec_raddr = maddr_t'(i * 17);
          dec_we = 1'b1; dec_waddr = maddr_t'(3000 + i); dec_wdata = 32'(i) * 32'h0101_0101;
          model[3000 + i] = dec_wdata;
          @(posedge clk) #1;
          checks++;
          if (dec_rdata !== model[i * 17]) begin
            failures++;
            $display("decoder read %0d: %h expected %h", i * 17, dec_rdata, model[i * 17]);
          end
          checks++;
          if (host_ack) begin failures++; $display("host acknowledged while decoder busy"); end
        end
        @(negedge clk) dec_we = 1'b0; dec_busy = 1'b0;
      end
    join
    checks++;
    if (w < 30 || q !== model[17]) begin
      failures++;
      $display("held host read: waited %0d, data %h expected %h", w, q, model[17]);
    end
    // decoder writes reached memory
    for (int i = 0; i < 30; i++) begin
      host_access(1'b0, maddr_t'(3000 + i), '0, q, w);
      checks++;
      if (q !== model[3000 + i]) begin failures++; $display("decoder write %0d lost", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
