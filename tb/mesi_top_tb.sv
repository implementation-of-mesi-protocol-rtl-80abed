// mesi_top_tb -- end-to-end test of the whole design at its default sizes:
// the three-processor MESI system and the single-processor write-back cache
// run side by side from reset (all lines invalid, memories zero).
//
// Three CPU processes drive the MESI system concurrently and one drives the
// single cache, all with random reads and writes on small address pools, so
// that sharing, conflicts and evictions are frequent. Every read must return
// the byte of the most recent completed write to that address (zero if none).
// The testbench counts how often each mechanism of the design occurred and
// counts a failure for any that never did: read hit, read miss filled from
// memory (E), read miss served by another cache (S), a cache checked without
// a hit, write hit, write to a shared line (invalidate and write memory),
// write miss, invalidation of a copy, write-back of an evicted dirty line,
// write-back of a dirty line supplied to another cache, and, in the single
// cache, read/write hits and misses and dirty write-backs.
module mesi_top_tb;
  import mesi_pkg::*;

  localparam int N = 3;

  logic clk = 1'b0;
  logic rst_n;
  logic  [N-1:0] mp_cpu_cac_read, mp_cpu_cac_wrt, mp_cac_cpu_hit, mp_cac_cpu_miss;
  logic  [N-1:0] mp_snp_hit, mp_snp_miss;
  addr_t [N-1:0] mp_cpu_cac_add;
  data_t [N-1:0] mp_cpu_cac_data, mp_cac_cpu_data;
  logic  sc_cpu_cac_read, sc_cpu_cac_wrt, sc_cac_cpu_hit, sc_cac_cpu_miss;
  addr_t sc_cpu_cac_add;
  data_t sc_cpu_cac_data, sc_cac_cpu_data;
  int checks = 0, failures = 0;

  mesi_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // ---------------- mechanism counters
  typedef enum int {
    EV_READ_HIT, EV_FILL_MEM, EV_FILL_PEER, EV_PEER_MISS, EV_WRITE_HIT, EV_WRITE_SHARED,
    EV_WRITE_MISS, EV_INVALIDATE, EV_VICTIM_WB, EV_SUPPLIER_WB,
    EV_SC_READ_HIT, EV_SC_READ_MISS, EV_SC_WRITE_HIT, EV_SC_WRITE_MISS, EV_SC_WB, EV_COUNT
  } ev_e;
  int ev [EV_COUNT];
  string ev_name [EV_COUNT] = '{"read hit", "read miss filled from memory",
    "read miss served by another cache", "cache checked without a hit", "write hit",
    "write to a shared line", "write miss", "copy invalidated", "dirty victim written back",
    "dirty supplier written back", "single cache read hit", "single cache read miss",
    "single cache write hit", "single cache write miss", "single cache write-back"};

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_mp.u_ctrl.mem_read) ev[EV_FILL_MEM]++;
      ev[EV_FILL_PEER] += $countones(mp_snp_hit);
      ev[EV_PEER_MISS] += $countones(mp_snp_miss);
      if (dut.u_mp.u_ctrl.mem_wrt) begin
        if (|dut.u_mp.u_ctrl.rsp_hit && !(|mp_snp_hit)) ev[EV_WRITE_SHARED]++;
        else if (|mp_snp_hit)                          ev[EV_SUPPLIER_WB]++;
        else                                           ev[EV_VICTIM_WB]++;
      end
      for (int k = 0; k < N; k++)
        if (dut.u_mp.u_ctrl.upd_en[k] && dut.u_mp.u_ctrl.upd_line[k].state == MESI_I)
          ev[EV_INVALIDATE]++;
      if (dut.u_sc.cac_mem_wrt) ev[EV_SC_WB]++;
    end
  end

  // ---------------- CPU processes
  data_t mp_latest [MEM_DEPTH];
  data_t sc_latest [MEM_DEPTH];

  task automatic mp_cpu(int k, int count);
    for (int n = 0; n < count; n++) begin
      logic  w, missed;
      addr_t a;
      data_t d;
      int    clocks;
      w = ($urandom_range(0, 2) == 0);
      a = addr_t'({2'($urandom_range(0, 3)), 3'($urandom_range(0, 2))});
      d = data_t'($urandom);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      @(negedge clk);
      mp_cpu_cac_read[k] = !w; mp_cpu_cac_wrt[k] = w;
      mp_cpu_cac_add[k] = a; mp_cpu_cac_data[k] = d;
      missed = 1'b0;
      clocks = 0;
      do begin
        @(negedge clk);
        mp_cpu_cac_read[k] = 1'b0; mp_cpu_cac_wrt[k] = 1'b0;
        clocks++;
        if (mp_cac_cpu_miss[k]) missed = 1'b1;
      end while (!mp_cac_cpu_hit[k] && clocks < 200);
      check($sformatf("cpu %0d access completes", k), clocks < 200, 1);
      if (w) begin
        mp_latest[a] = d;
        if (missed) ev[EV_WRITE_MISS]++; else ev[EV_WRITE_HIT]++;
      end else begin
        check($sformatf("cpu %0d read %0d", k, a), mp_cac_cpu_data[k], mp_latest[a]);
        if (!missed) ev[EV_READ_HIT]++;
      end
    end
  endtask

  task automatic sc_cpu(int count);
    for (int n = 0; n < count; n++) begin
      logic  w, missed;
      addr_t a;
      data_t d;
      int    clocks;
      w = ($urandom_range(0, 2) == 0);
      a = addr_t'({2'($urandom_range(0, 3)), 3'($urandom_range(0, 3))});
      d = data_t'($urandom);
      @(negedge clk);
      sc_cpu_cac_read = !w; sc_cpu_cac_wrt = w; sc_cpu_cac_add = a; sc_cpu_cac_data = d;
      missed = 1'b0;
      clocks = 0;
      do begin
        @(negedge clk);
        sc_cpu_cac_read = 1'b0; sc_cpu_cac_wrt = 1'b0;
        clocks++;
        if (sc_cac_cpu_miss) missed = 1'b1;
      end while (!sc_cac_cpu_hit && clocks < 50);
      check("single cache access completes", clocks < 50, 1);
      if (w) begin
        sc_latest[a] = d;
        if (missed) ev[EV_SC_WRITE_MISS]++; else ev[EV_SC_WRITE_HIT]++;
      end else begin
        check($sformatf("single cache read %0d", a), sc_cac_cpu_data, sc_latest[a]);
        if (missed) ev[EV_SC_READ_MISS]++; else ev[EV_SC_READ_HIT]++;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    mp_cpu_cac_read = '0; mp_cpu_cac_wrt = '0; mp_cpu_cac_add = '0; mp_cpu_cac_data = '0;
    sc_cpu_cac_read = 1'b0; sc_cpu_cac_wrt = 1'b0; sc_cpu_cac_add = '0; sc_cpu_cac_data = '0;
    for (int i = 0; i < EV_COUNT; i++) ev[i] = 0;
    for (int a = 0; a < MEM_DEPTH; a++) begin
      mp_latest[a] = '0;
      sc_latest[a] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    fork
      mp_cpu(0, 500);
      mp_cpu(1, 500);
      mp_cpu(2, 500);
      sc_cpu(1500);
    join

    for (int i = 0; i < EV_COUNT; i++) begin
      $display("%-36s %0d", ev_name[i], ev[i]);
      check($sformatf("mechanism '%s' occurred", ev_name[i]), ev[i] > 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
