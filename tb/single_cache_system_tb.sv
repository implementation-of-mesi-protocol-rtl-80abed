// single_cache_system_tb -- self-checking test of the cache wired to the real
// main memory. It replays the write-back case (a dirty line evicted by a read
// miss must reach memory before the new byte is read) from its initial
// values, then runs random reads and writes and checks that every read
// returns the last byte written to that address, or the initial memory byte.
// At the end every dirty line is forced out and memory must hold the last
// value of every address.
module single_cache_system_tb;
  import mesi_pkg::*;

  function automatic sc_image_t gen_cache_init();
    sc_image_t c = SC_EMPTY_IMAGE;
    c[0] = sc_line_t'(12'b0111_0000_0100);
    return c;
  endfunction
  function automatic mem_image_t gen_mem_init();
    mem_image_t m;
    for (int i = 0; i < MEM_DEPTH; i++) m[i] = data_t'(8'h20 + i);
    m[16] = 8'b0000_1110;
    m[24] = 8'b0000_0100;
    return m;
  endfunction
  localparam sc_image_t  CACHE_INIT = gen_cache_init();
  localparam mem_image_t MEM_INIT   = gen_mem_init();

  logic  clk = 1'b0;
  logic  rst_n;
  logic  cpu_cac_read, cpu_cac_wrt;
  addr_t cpu_cac_add;
  data_t cpu_cac_data;
  logic  cac_cpu_hit, cac_cpu_miss;
  data_t cac_cpu_data;
  int    checks = 0, failures = 0;

  single_cache_system #(.CACHE_INIT(CACHE_INIT), .MEM_INIT(MEM_INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic access(input logic write, input addr_t a, input data_t d,
                        output logic missed, output data_t rdata);
    int clocks = 0;
    @(negedge clk);
    cpu_cac_read = !write; cpu_cac_wrt = write; cpu_cac_add = a; cpu_cac_data = d;
    missed = 1'b0;
    do begin
      @(negedge clk);
      cpu_cac_read = 1'b0; cpu_cac_wrt = 1'b0;
      clocks++;
      if (cac_cpu_miss) missed = 1'b1;
    end while (!cac_cpu_hit && clocks < 50);
    check("access completes", clocks < 50, 1);
    rdata = cac_cpu_data;
  endtask

  logic  missed;
  data_t rdata;
  data_t last [MEM_DEPTH];

  initial begin
    rst_n = 1'b0; cpu_cac_read = 1'b0; cpu_cac_wrt = 1'b0; cpu_cac_add = '0; cpu_cac_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < MEM_DEPTH; i++) last[i] = MEM_INIT[i];
    last[24] = 8'b0000_0100;

    // Write miss on 10000, then a read of 11000 evicts the dirty line.
    access(1'b1, 5'b10000, 8'b0000_1000, missed, rdata);
    check("write miss", missed, 1);
    check("memory[16] before write-back", dut.u_mem.mem_q[16], 8'b0000_1110);
    last[16] = 8'b0000_1000;
    access(1'b0, 5'b11000, '0, missed, rdata);
    check("read miss", missed, 1);
    check("memory[16] after write-back", dut.u_mem.mem_q[16], 8'b0000_1000);
    check("read data", rdata, 8'b0000_0100);
    access(1'b0, 5'b10000, '0, missed, rdata);
    check("read back written byte", rdata, 8'b0000_1000);

    for (int n = 0; n < 500; n++) begin
      logic  w;
      addr_t a;
      data_t d;
      w = ($urandom_range(0, 2) == 0);
      a = addr_t'($urandom_range(0, MEM_DEPTH - 1));
      d = data_t'($urandom);
      access(w, a, d, missed, rdata);
      if (w) last[a] = d;
      else check($sformatf("read %0d addr %0d", n, a), rdata, last[a]);
    end
    // Evict every line by reading an address of a different tag.
    for (int i = 0; i < NUM_LINES; i++) begin
      for (int t = 0; t < 4; t++) access(1'b0, addr_t'({t[1:0], i[2:0]}), '0, missed, rdata);
    end
    for (int i = 0; i < NUM_LINES; i++) access(1'b0, addr_t'(i), '0, missed, rdata);
    for (int a = NUM_LINES; a < MEM_DEPTH; a++)
      check($sformatf("memory %0d", a), dut.u_mem.mem_q[a], last[a]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
