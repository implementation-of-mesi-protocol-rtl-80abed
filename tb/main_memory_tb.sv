// main_memory_tb -- self-checking test of the 32-byte main memory: reset
// contents, write then read of every byte, one-clock read latency, and that
// the read data holds between reads.
module main_memory_tb;
  import mesi_pkg::*;

  localparam mem_image_t INIT_IMG = gen_init();

  function automatic mem_image_t gen_init();
    mem_image_t m;
    for (int i = 0; i < MEM_DEPTH; i++) m[i] = data_t'(8'h40 + i * 3);
    return m;
  endfunction

  logic  clk = 1'b0;
  logic  rst_n;
  logic  mem_read, mem_wrt;
  addr_t mem_add;
  data_t mem_wdata, mem_rdata;
  int    checks = 0, failures = 0;

  main_memory #(.INIT(INIT_IMG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, data_t got, data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic rd(addr_t a, data_t exp);
    @(negedge clk);
    mem_read = 1'b1; mem_add = a;
    @(negedge clk);
    mem_read = 1'b0;
    check($sformatf("read %0d", a), mem_rdata, exp);
  endtask

  task automatic wr(addr_t a, data_t d);
    @(negedge clk);
    mem_wrt = 1'b1; mem_add = a; mem_wdata = d;
    @(negedge clk);
    mem_wrt = 1'b0;
  endtask

  data_t shadow [MEM_DEPTH];

  initial begin
    rst_n = 1'b0; mem_read = 1'b0; mem_wrt = 1'b0; mem_add = '0; mem_wdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < MEM_DEPTH; i++) begin
      shadow[i] = data_t'(8'h40 + i * 3);
      rd(addr_t'(i), shadow[i]);
    end
    for (int n = 0; n < 200; n++) begin
      addr_t a;
      data_t d;
      a = addr_t'($urandom_range(0, MEM_DEPTH - 1));
      d = data_t'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        wr(a, d);
        shadow[a] = d;
      end else begin
        rd(a, shadow[a]);
      end
    end
    // Read data is held until the next read, across a write.
    rd(addr_t'(5), shadow[5]);
    wr(addr_t'(6), 8'hA5);
    shadow[6] = 8'hA5;
    check("read data held", mem_rdata, shadow[5]);
    // Latency: data appears on the edge after the read is issued, not before.
    @(negedge clk);
    mem_read = 1'b1; mem_add = 6;
    #1 check("no zero-latency read", mem_rdata, shadow[5]);
    @(negedge clk);
    mem_read = 1'b0;
    check("one-clock read", mem_rdata, 8'hA5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
