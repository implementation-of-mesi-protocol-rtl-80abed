// mesi_system_tb -- self-checking test of the three-cache MESI system.
//
// Directed phase: starting from initial lines and memory bytes that hold
// every case at once, the testbench replays the system's worked cases in
// order: local read hit; read miss served by cache B (both lines to S);
// read miss served by cache C after B misses; read miss served by memory
// (line to E); write hit in E (to M, no memory write); write hit in S
// (other copy invalidated, byte written to memory); the three-processor
// sequence where a modified line is read by a third cache; and a write miss
// that evicts a dirty line. Each case checks hit/miss, data, the exact
// resulting line values, memory, the snoop pulses and the clocks taken.
//
// Random phase: the three CPUs issue random reads and writes concurrently on
// a small address pool. Every read must return the byte of the most recent
// completed write to that address (or the initial memory byte), and on every
// clock the caches must obey the MESI rules: a line in M or E is the only
// valid copy of its address, and all S copies hold the same byte.
module mesi_system_tb;
  import mesi_pkg::*;

  localparam int N = 3;
  localparam int A = 0, B = 1, C = 2;

  function automatic mesi_image_t [N-1:0] gen_cache_init();
    mesi_image_t [N-1:0] c = {N{MESI_EMPTY_IMAGE}};
    c[A][7] = mesi_line_t'(14'b01_0_1_00_00010100);
    c[A][6] = mesi_line_t'(14'b01_0_1_01_00000010);
    c[A][0] = mesi_line_t'(14'b01_0_1_11_00000100);
    c[A][4] = mesi_line_t'(14'b10_0_1_11_00000101);
    c[B][7] = mesi_line_t'(14'b01_0_1_10_00001001);
    c[B][4] = mesi_line_t'(14'b10_0_1_11_00000101);
    c[B][6] = mesi_line_t'(14'b01_0_1_11_00011101);
    c[C][6] = mesi_line_t'(14'b01_0_1_10_00011110);
    return c;
  endfunction
  function automatic mem_image_t gen_mem_init();
    mem_image_t m;
    for (int i = 0; i < MEM_DEPTH; i++) m[i] = data_t'(8'hC0 + i);
    m[5'b00111] = 8'b0001_0100;
    m[5'b01110] = 8'b0000_0010;
    m[5'b11000] = 8'b0000_0100;
    m[5'b11100] = 8'b0000_0101;
    m[5'b10111] = 8'b0000_1001;
    m[5'b11110] = 8'b0001_1101;
    m[5'b10110] = 8'b0001_1110;
    m[5'b01111] = 8'b0000_1111;
    return m;
  endfunction
  localparam mesi_image_t [N-1:0] CACHE_INIT = gen_cache_init();
  localparam mem_image_t          MEM_INIT   = gen_mem_init();

  // Clocks from the request to cac_cpu_hit, as seen by the CPU.
  localparam int LAT_HIT = 3, LAT_PEER1 = 4, LAT_PEER2 = 5, LAT_MEM = 7, LAT_WMISS = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic  [N-1:0] cpu_cac_read, cpu_cac_wrt, cac_cpu_hit, cac_cpu_miss, snp_hit, snp_miss;
  addr_t [N-1:0] cpu_cac_add;
  data_t [N-1:0] cpu_cac_data, cac_cpu_data;
  int checks = 0, failures = 0;

  mesi_system #(.NUM_CACHES(N), .CACHE_INIT(CACHE_INIT), .MEM_INIT(MEM_INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
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

  function automatic mesi_line_t line(int k, int i);
    case (k)
      0: return dut.g_cache[0].u_cache.lines_q[i];
      1: return dut.g_cache[1].u_cache.lines_q[i];
      default: return dut.g_cache[2].u_cache.lines_q[i];
    endcase
  endfunction

  function automatic data_t memory(int a);
    return dut.u_mem.mem_q[a];
  endfunction

  logic [N-1:0] acc_sh, acc_sm;

  // One access by CPU k; returns whether it missed, clocks and the byte.
  task automatic access(input int k, input logic w, input addr_t a, input data_t d,
                        output logic missed, output int clocks, output data_t rdata);
    @(negedge clk);
    cpu_cac_read[k] = !w; cpu_cac_wrt[k] = w; cpu_cac_add[k] = a; cpu_cac_data[k] = d;
    missed = 1'b0;
    clocks = 0;
    do begin
      @(negedge clk);
      cpu_cac_read[k] = 1'b0; cpu_cac_wrt[k] = 1'b0;
      clocks++;
      if (cac_cpu_miss[k]) missed = 1'b1;
    end while (!cac_cpu_hit[k] && clocks < 100);
    rdata = cac_cpu_data[k];
  endtask

  always @(posedge clk) begin
    acc_sh <= acc_sh | snp_hit;
    acc_sm <= acc_sm | snp_miss;
  end

  logic  missed;
  int    clocks;
  data_t rdata;

  // ---------------- MESI rule checker, every clock
  bit checking = 0;
  always @(negedge clk) begin
    if (checking) begin
      for (int i = 0; i < NUM_LINES; i++) begin
        for (int k = 0; k < N; k++) begin
          mesi_line_t lk;
          lk = line(k, i);
          if (lk.valid && lk.state != MESI_I) begin
            for (int j = 0; j < N; j++) begin
              mesi_line_t lj;
              lj = line(j, i);
              if (j != k && mesi_holds(lj, lk.tag)) begin
                check($sformatf("M/E copy %0d line %0d is the only one", k, i),
                      lk.state inside {MESI_M, MESI_E}, 0);
                check($sformatf("S copies %0d/%0d line %0d agree", k, j, i), lj.data, lk.data);
              end
            end
          end
        end
      end
    end
  end

  // ---------------- random phase bookkeeping
  data_t latest [MEM_DEPTH];
  int    reads_done = 0, writes_done = 0;

  task automatic cpu_random(int k, int count);
    for (int n = 0; n < count; n++) begin
      logic  w, m;
      addr_t a;
      data_t d, r;
      int    cl;
      w = ($urandom_range(0, 2) == 0);
      a = addr_t'({2'($urandom_range(0, 3)), 3'($urandom_range(0, 1))});
      d = data_t'($urandom);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      access(k, w, a, d, m, cl, r);
      check($sformatf("cpu %0d access completes", k), cl < 100, 1);
      // The access was serialised on the clock its hit came back.
      if (w) begin
        latest[a] = d;
        writes_done++;
      end else begin
        check($sformatf("cpu %0d read %0d returns latest", k, a), r, latest[a]);
        reads_done++;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    cpu_cac_read = '0; cpu_cac_wrt = '0; cpu_cac_add = '0; cpu_cac_data = '0;
    acc_sh = '0; acc_sm = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checking = 1;

    // 1. Local read hit: A reads 00111.
    access(A, 1'b0, 5'b00111, '0, missed, clocks, rdata);
    check("A read hit: miss", missed, 0);
    check("A read hit: data", rdata, 8'b0001_0100);
    check("A read hit: clocks", clocks, LAT_HIT);

    // 2. A misses 10111, B holds it: both S.
    acc_sh = '0; acc_sm = '0;
    access(A, 1'b0, 5'b10111, '0, missed, clocks, rdata);
    check("RMA RHB: miss", missed, 1);
    check("RMA RHB: data", rdata, 8'b0000_1001);
    check("RMA RHB: line A", line(A, 7), 14'b10_0_1_10_00001001);
    check("RMA RHB: line B", line(B, 7), 14'b10_0_1_10_00001001);
    check("RMA RHB: snoop hit B", acc_sh, 3'b010);
    check("RMA RHB: clocks", clocks, LAT_PEER1);

    // 3. A misses 10110, B misses, C holds it: both S.
    acc_sh = '0; acc_sm = '0;
    access(A, 1'b0, 5'b10110, '0, missed, clocks, rdata);
    check("RMA RMB RHC: miss", missed, 1);
    check("RMA RMB RHC: data", rdata, 8'b0001_1110);
    check("RMA RMB RHC: line A", line(A, 6), 14'b10_0_1_10_00011110);
    check("RMA RMB RHC: line C", line(C, 6), 14'b10_0_1_10_00011110);
    check("RMA RMB RHC: line B kept", line(B, 6), 14'b01_0_1_11_00011101);
    check("RMA RMB RHC: snoop miss B", acc_sm, 3'b010);
    check("RMA RMB RHC: snoop hit C", acc_sh, 3'b100);
    check("RMA RMB RHC: clocks", clocks, LAT_PEER2);

    // 4. A misses 01111, no cache holds it: read from memory, E.
    acc_sh = '0; acc_sm = '0;
    access(A, 1'b0, 5'b01111, '0, missed, clocks, rdata);
    check("RMA RMB RMC: miss", missed, 1);
    check("RMA RMB RMC: data", rdata, 8'b0000_1111);
    check("RMA RMB RMC: line A", line(A, 7), 14'b01_0_1_01_00001111);
    check("RMA RMB RMC: snoop misses", acc_sm, 3'b110);
    check("RMA RMB RMC: no snoop hit", acc_sh, 3'b000);
    check("RMA RMB RMC: clocks", clocks, LAT_MEM);

    // 5. Write hit in E: A writes 00000001 to 11000 -> M, dirty.
    access(A, 1'b1, 5'b11000, 8'b0000_0001, missed, clocks, rdata);
    check("WHA E: miss", missed, 0);
    check("WHA E: line A", line(A, 0), 14'b00_1_1_11_00000001);
    check("WHA E: memory unchanged", memory(5'b11000), 8'b0000_0100);
    check("WHA E: clocks", clocks, LAT_HIT);

    // 6. Write hit in S: A writes 00000001 to 11100, B invalidated.
    access(A, 1'b1, 5'b11100, 8'b0000_0001, missed, clocks, rdata);
    check("WHA S: miss", missed, 0);
    check("WHA S: line A", line(A, 4), 14'b00_1_1_11_00000001);
    check("WHA S: line B", line(B, 4), 14'b11_0_1_11_00000101);
    check("WHA S: memory written", memory(5'b11100), 8'b0000_0001);
    check("WHA S: clocks", clocks, LAT_HIT);

    // 7. Three processors on 11100: B re-reads it (served by A), both hit,
    //    A writes 11111111 (B invalidated, memory written), C reads it.
    access(B, 1'b0, 5'b11100, '0, missed, clocks, rdata);
    check("B re-read: miss", missed, 1);
    check("B re-read: data", rdata, 8'b0000_0001);
    check("B re-read: line A", line(A, 4), 14'b10_0_1_11_00000001);
    access(A, 1'b0, 5'b11100, '0, missed, clocks, rdata);
    check("A read hit: miss", missed, 0);
    access(B, 1'b0, 5'b11100, '0, missed, clocks, rdata);
    check("B read hit: miss", missed, 0);
    check("B read hit: data", rdata, 8'b0000_0001);
    access(A, 1'b1, 5'b11100, 8'b1111_1111, missed, clocks, rdata);
    check("A write shared: line A", line(A, 4), 14'b00_1_1_11_11111111);
    check("A write shared: line B", line(B, 4).state, MESI_I);
    check("A write shared: memory", memory(5'b11100), 8'b1111_1111);
    acc_sh = '0; acc_sm = '0;
    access(C, 1'b0, 5'b11100, '0, missed, clocks, rdata);
    check("C read: miss", missed, 1);
    check("C read: data", rdata, 8'b1111_1111);
    check("C read: line C", line(C, 4), 14'b10_0_1_11_11111111);
    check("C read: line A", line(A, 4), 14'b10_0_1_11_11111111);
    check("C read: snoop hit A", acc_sh, 3'b001);

    // 8. Write miss with a dirty victim: A writes 00000 over M line 11000.
    access(A, 1'b1, 5'b00000, 8'h3C, missed, clocks, rdata);
    check("WMA dirty victim: miss", missed, 1);
    check("WMA dirty victim: write-back", memory(5'b11000), 8'b0000_0001);
    check("WMA dirty victim: line A", line(A, 0), 14'b00_1_1_00_00111100);
    check("WMA dirty victim: clocks", clocks, LAT_WMISS + 1);

    // Random concurrent phase.
    for (int a = 0; a < MEM_DEPTH; a++) latest[a] = memory(a);
    for (int k = 0; k < N; k++)
      for (int i = 0; i < NUM_LINES; i++) begin
        mesi_line_t l;
        l = line(k, i);
        if (l.valid && l.state != MESI_I) latest[{l.tag, i[2:0]}] = l.data;
      end
    fork
      cpu_random(A, 400);
      cpu_random(B, 400);
      cpu_random(C, 400);
    join
    $display("random phase: %0d reads, %0d writes", reads_done, writes_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
