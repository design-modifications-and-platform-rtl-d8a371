// tb_const_mem_ctrl: constant memory controller with a constant memory.
// The host loads a table while the decoder is idle, the decoder reads it
// while busy (one cycle latency), and a host access during decoding waits
// until the decoder is idle again.
module tb_const_mem_ctrl;
  import dpr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   dec_busy = 1'b0;
  maddr_t dec_addr = '0;
  mword_t dec_rdata;
  logic   host_req = 1'b0, host_we = 1'b0, host_ack;
  maddr_t host_addr = '0;
  mword_t host_wdata = '0, host_rdata;
  logic   mem_we;
  maddr_t mem_addr;
  mword_t mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  const_mem_ctrl dut (.*);
  constant_memory u_mem (.clk(clk), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
                         .rdata(mem_rdata));

  function automatic mword_t tw(int i);
    return mword_t'(i * 7919 + 13);
  endfunction

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

  initial begin
    mword_t q;
    int w;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 512; i++) host_access(1'b1, maddr_t'(i), tw(i), q, w);
    host_access(1'b0, 12'd100, '0, q, w);
    checks++;
    if (q !== tw(100) || w != 0) begin failures++; $display("host read back %h", q); end
    @(negedge clk) dec_busy = 1'b1;
    fork
      host_access(1'b0, 12'd5, '0, q, w);
      begin
        for (int n = 0; n < 200; n++) begin
          int i;
          i = $urandom_range(0, 511);
          @(negedge clk) dec_addr = maddr_t'(i);
          @(posedge clk) #1;
          checks++;
          if (dec_rdata !== tw(i)) begin
            failures++;
            $display("decoder read %0d: %h expected %h", i, dec_rdata, tw(i));
          end
        end
        @(negedge clk) dec_busy = 1'b0;
      end
    join
    checks++;
    if (w < 200 || q !== tw(5)) begin failures++; $display("held host read: %0d waits, %h", w, q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
