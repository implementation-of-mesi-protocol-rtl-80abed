// wb_cache_tb -- self-checking test of the single write-back cache.
//
// The cache is connected to a memory model kept in this testbench (one-clock
// read latency). First the six worked cases of the single-cache design are
// replayed from their initial line and memory values, checking the hit/miss
// signals, the byte returned, the resulting line value, the memory after a
// write-back and the number of clocks each access takes. Then a random
// sequence of reads and writes is checked against a reference model of a
// direct-mapped write-back, write-allocate cache.
module wb_cache_tb;
  import mesi_pkg::*;

  // Initial lines: 0 = 0111_0000_0100, 1 = 0110_0011_1111, 5 = 0110_0000_1010.
  function automatic sc_image_t gen_cache_init();
    sc_image_t c = SC_EMPTY_IMAGE;
    c[0] = sc_line_t'(12'b0111_0000_0100);
    c[1] = sc_line_t'(12'b0110_0011_1111);
    c[5] = sc_line_t'(12'b0110_0000_1010);
    return c;
  endfunction
  localparam sc_image_t CACHE_INIT = gen_cache_init();

  // Latencies in clocks, from the edge before the request to cac_cpu_hit.
  localparam int LAT_HIT = 2, LAT_WMISS = 3, LAT_RMISS = 4, LAT_WB = 1;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  cpu_cac_read, cpu_cac_wrt;
  addr_t cpu_cac_add;
  data_t cpu_cac_data;
  logic  cac_cpu_hit, cac_cpu_miss;
  data_t cac_cpu_data;
  logic  cac_mem_read, cac_mem_wrt;
  addr_t cac_mem_add;
  data_t cac_mem_data, mem_cac_data;
  int    checks = 0, failures = 0;

  wb_cache #(.INIT(CACHE_INIT)) dut (.*);

  // Memory model.
  data_t mem [MEM_DEPTH];
  int    mem_writes;
  always_ff @(posedge clk) begin
    if (cac_mem_wrt) begin
      mem[cac_mem_add] <= cac_mem_data;
      mem_writes <= mem_writes + 1;
    end
    if (cac_mem_read) mem_cac_data <= mem[cac_mem_add];
  end

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

  task automatic init_mem();
    for (int i = 0; i < MEM_DEPTH; i++) mem[i] = data_t'(8'h20 + i);
    mem[13] = 8'b0000_1110;
    mem[9]  = 8'b1000_1000;
    mem[16] = 8'b0000_1110;
    mem[24] = 8'b0000_0100;
  endtask

  task automatic do_reset();
    rst_n = 1'b0; cpu_cac_read = 1'b0; cpu_cac_wrt = 1'b0;
    cpu_cac_add = '0; cpu_cac_data = '0;
    init_mem();
    mem_writes = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  endtask

  // One access: request for one clock, wait for cac_cpu_hit.
  task automatic access(input logic write, input addr_t a, input data_t d,
                        output logic missed, output int clocks, output data_t rdata);
    @(negedge clk);
    cpu_cac_read = !write; cpu_cac_wrt = write; cpu_cac_add = a; cpu_cac_data = d;
    missed = 1'b0;
    clocks = 0;
    do begin
      @(negedge clk);
      cpu_cac_read = 1'b0; cpu_cac_wrt = 1'b0;
      clocks++;
      if (cac_cpu_miss) missed = 1'b1;
    end while (!cac_cpu_hit && clocks < 50);
    rdata = cac_cpu_data;
  endtask

  logic  missed;
  int    clocks;
  data_t rdata;

  // Reference model for the random phase.
  sc_line_t ref_lines [NUM_LINES];

  initial begin
    // Read hit: 11000 -> 00000100.
    do_reset();
    access(1'b0, 5'b11000, '0, missed, clocks, rdata);
    check("read hit: miss", missed, 0);
    check("read hit: data", rdata, 8'b0000_0100);
    check("read hit: clocks", clocks, LAT_HIT);

    // Read miss: 01101 -> line 5 becomes 0101_0000_1110, data 00001110.
    do_reset();
    access(1'b0, 5'b01101, '0, missed, clocks, rdata);
    check("read miss: miss", missed, 1);
    check("read miss: data", rdata, 8'b0000_1110);
    check("read miss: line", dut.lines_q[5], 12'b0101_0000_1110);
    check("read miss: clocks", clocks, LAT_RMISS);

    // Write hit: 11000 <- 00001000 -> line 0 becomes 1111_0000_1000.
    do_reset();
    access(1'b1, 5'b11000, 8'b0000_1000, missed, clocks, rdata);
    check("write hit: miss", missed, 0);
    check("write hit: line", dut.lines_q[0], 12'b1111_0000_1000);
    check("write hit: clocks", clocks, LAT_HIT);
    check("write hit: no memory write", mem_writes, 0);

    // Write miss then read hit: 10000 <- 00001000 -> 1110_0000_1000.
    do_reset();
    access(1'b1, 5'b10000, 8'b0000_1000, missed, clocks, rdata);
    check("write miss: miss", missed, 1);
    check("write miss: line", dut.lines_q[0], 12'b1110_0000_1000);
    check("write miss: clocks", clocks, LAT_WMISS);
    check("write miss: no memory write", mem_writes, 0);
    access(1'b0, 5'b10000, '0, missed, clocks, rdata);
    check("read after write miss: miss", missed, 0);
    check("read after write miss: data", rdata, 8'b0000_1000);

    // Write back: the dirty line of 10000 is evicted by a read of 11000.
    access(1'b0, 5'b11000, '0, missed, clocks, rdata);
    check("write back: miss", missed, 1);
    check("write back: memory[16]", mem[16], 8'b0000_1000);
    check("write back: data", rdata, 8'b0000_0100);
    check("write back: line", dut.lines_q[0], 12'b0111_0000_0100);
    check("write back: clocks", clocks, LAT_RMISS + LAT_WB);
    check("write back: one memory write", mem_writes, 1);

    // Read hit then read miss: 11000 -> 00000100; 01001 -> 10001000.
    do_reset();
    access(1'b0, 5'b11000, '0, missed, clocks, rdata);
    check("rh/rm: hit data", rdata, 8'b0000_0100);
    access(1'b0, 5'b01001, '0, missed, clocks, rdata);
    check("rh/rm: miss", missed, 1);
    check("rh/rm: data", rdata, 8'b1000_1000);
    check("rh/rm: line", dut.lines_q[1], 12'b0101_1000_1000);

    // Random phase against the reference model.
    do_reset();
    for (int i = 0; i < NUM_LINES; i++) ref_lines[i] = CACHE_INIT[i];
    begin
      data_t ref_mem [MEM_DEPTH];
      for (int i = 0; i < MEM_DEPTH; i++) ref_mem[i] = mem[i];
      for (int n = 0; n < 400; n++) begin
        logic     w, hit;
        addr_t    a;
        data_t    d, exp_data;
        index_t   idx;
        sc_line_t l;
        int       exp_clocks;
        w   = logic'($urandom_range(0, 1));
        a   = addr_t'($urandom_range(0, MEM_DEPTH - 1));
        d   = data_t'($urandom);
        idx = a[2:0];
        l   = ref_lines[idx];
        hit = l.valid && l.tag == a[4:3];
        exp_clocks = hit ? LAT_HIT : (w ? LAT_WMISS : LAT_RMISS);
        if (!hit && l.valid && l.dirty) begin
          ref_mem[{l.tag, idx}] = l.data;
          exp_clocks += LAT_WB;
        end
        if (w) ref_lines[idx] = '{dirty: 1'b1, valid: 1'b1, tag: a[4:3], data: d};
        else if (!hit) ref_lines[idx] = '{dirty: 1'b0, valid: 1'b1, tag: a[4:3], data: ref_mem[a]};
        exp_data = ref_lines[idx].data;
        access(w, a, d, missed, clocks, rdata);
        check($sformatf("random %0d miss", n), missed, !hit);
        check($sformatf("random %0d clocks", n), clocks, exp_clocks);
        if (!w) check($sformatf("random %0d data", n), rdata, exp_data);
      end
      for (int i = 0; i < MEM_DEPTH; i++) check($sformatf("final memory %0d", i), mem[i], ref_mem[i]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
