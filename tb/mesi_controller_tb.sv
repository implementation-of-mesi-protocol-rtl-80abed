// mesi_controller_tb -- self-checking test of the coherence controller with
// three caches and the memory modelled in this testbench.
//
// The caches' line arrays and the memory are plain arrays here; the
// testbench shows the controller each cache's line at bus_index with its
// match flag, applies the controller's line updates and memory writes, and
// clears a cache's pending request on rsp_hit. Random requests arrive from
// all three caches at once. Because the controller serves one request at a
// time, every completed request can be checked against a transaction-level
// MESI reference model: after each rsp_hit the three caches and the memory
// must equal the model's, the returned byte must match, and rsp_miss and the
// snp_hit/snp_miss pulses must match the model's look-ups. In a directed
// phase, single requests check the clocks each kind of access takes.
module mesi_controller_tb;
  import mesi_pkg::*;

  localparam int N = 3;

  logic clk = 1'b0;
  logic rst_n;
  logic       [N-1:0] req_valid, req_write, bus_match, upd_en, rsp_hit, rsp_miss, snp_hit, snp_miss;
  addr_t      [N-1:0] req_add;
  data_t      [N-1:0] req_data;
  mesi_line_t [N-1:0] bus_line, upd_line;
  index_t bus_index;
  tag_t   bus_tag;
  data_t  rsp_data;
  logic   mem_read, mem_wrt;
  addr_t  mem_add;
  data_t  mem_wdata, mem_rdata;
  int     checks = 0, failures = 0;

  mesi_controller #(.NUM_CACHES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
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

  // ---------------- cache and memory models driven by the controller
  mesi_line_t lines [N][NUM_LINES];
  data_t      mem [MEM_DEPTH];

  always_comb begin
    for (int k = 0; k < N; k++) begin
      bus_line[k]  = lines[k][bus_index];
      bus_match[k] = mesi_holds(bus_line[k], bus_tag);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < N; k++) if (upd_en[k]) lines[k][bus_index] <= upd_line[k];
      if (mem_wrt) mem[mem_add] <= mem_wdata;
      if (mem_read) mem_rdata <= mem[mem_add];
      for (int k = 0; k < N; k++) if (rsp_hit[k]) req_valid[k] <= 1'b0;
    end
  end

  // ---------------- transaction-level reference model
  mesi_line_t g_lines [N][NUM_LINES];
  data_t      g_mem [MEM_DEPTH];

  // Applies one request; returns the byte read, whether it missed, the
  // snoop hit/miss pattern and the clocks from grant to response.
  task automatic ref_access(input int r, input logic w, input addr_t a, input data_t d,
                            output data_t rd, output logic miss,
                            output logic [N-1:0] sh, output logic [N-1:0] sm, output int clk_cnt);
    index_t     i = a[2:0];
    tag_t       t = a[4:3];
    mesi_line_t own = g_lines[r][i];
    logic       hit = own.valid && own.state != MESI_I && own.tag == t;
    logic       found = 1'b0;
    sh = '0; sm = '0; rd = '0;
    miss = !hit;
    clk_cnt = 1;
    if (hit) begin
      rd = own.data;
      if (w) begin
        if (own.state == MESI_S) begin
          for (int k = 0; k < N; k++)
            if (k != r && mesi_holds(g_lines[k][i], t)) begin
              g_lines[k][i].state = MESI_I;
              g_lines[k][i].dirty = 1'b0;
            end
          g_mem[a] = d;
        end
        g_lines[r][i] = '{state: MESI_M, dirty: 1'b1, valid: 1'b1, tag: t, data: d};
      end
      return;
    end
    if (own.valid && own.dirty && own.state != MESI_I) begin
      g_mem[{own.tag, i}] = own.data;
      clk_cnt++;
    end
    if (w) begin
      for (int k = 0; k < N; k++)
        if (k != r && mesi_holds(g_lines[k][i], t)) begin
          g_lines[k][i].state = MESI_I;
          g_lines[k][i].dirty = 1'b0;
        end
      g_lines[r][i] = '{state: MESI_M, dirty: 1'b1, valid: 1'b1, tag: t, data: d};
      clk_cnt++;
      return;
    end
    for (int s = 1; s < N && !found; s++) begin
      int p = (r + s) % N;
      clk_cnt++;
      if (mesi_holds(g_lines[p][i], t)) begin
        found = 1'b1;
        sh[p] = 1'b1;
        if (g_lines[p][i].dirty) g_mem[a] = g_lines[p][i].data;
        g_lines[p][i].state = MESI_S;
        g_lines[p][i].dirty = 1'b0;
        rd = g_lines[p][i].data;
        g_lines[r][i] = '{state: MESI_S, dirty: 1'b0, valid: 1'b1, tag: t, data: rd};
      end else begin
        sm[p] = 1'b1;
      end
    end
    if (!found) begin
      rd = g_mem[a];
      g_lines[r][i] = '{state: MESI_E, dirty: 1'b0, valid: 1'b1, tag: t, data: rd};
      clk_cnt += 2;
    end
  endtask

  // ---------------- monitor: per-request observed behaviour
  logic [N-1:0] seen_miss, seen_sh, seen_sm;
  int           busy_clocks [N];
  int           completed = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      seen_miss <= seen_miss | rsp_miss;
      seen_sh   <= seen_sh | snp_hit;
      seen_sm   <= seen_sm | snp_miss;
    end
  end

  // Compare every completed request with the reference model.
  always @(negedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < N; r++) begin
        if (rsp_hit[r]) begin
          data_t rd; logic miss; logic [N-1:0] sh, sm; int cc;
          ref_access(r, req_write[r], req_add[r], req_data[r], rd, miss, sh, sm, cc);
          if (!req_write[r]) check($sformatf("cache %0d read %0h", r, req_add[r]), rsp_data, rd);
          check($sformatf("cache %0d miss flag", r), seen_miss[r] | rsp_miss[r], miss);
          check($sformatf("cache %0d snoop hits", r), seen_sh | snp_hit, sh);
          check($sformatf("cache %0d snoop misses", r), seen_sm | snp_miss, sm);
          last_clocks = cc;
          completed++;
          @(posedge clk);
          #1;
          seen_miss = '0; seen_sh = '0; seen_sm = '0;
          for (int k = 0; k < N; k++)
            for (int i = 0; i < NUM_LINES; i++)
              check($sformatf("cache %0d line %0d", k, i), lines[k][i], g_lines[k][i]);
          for (int a = 0; a < MEM_DEPTH; a++) check($sformatf("memory %0d", a), mem[a], g_mem[a]);
        end
      end
    end
  end

  int last_clocks;

  // Issues one request from cache r and returns the clocks until rsp_hit.
  task automatic single(input int r, input logic w, input addr_t a, input data_t d, output int n);
    @(negedge clk);
    req_valid[r] = 1'b1; req_write[r] = w; req_add[r] = a; req_data[r] = d;
    n = 0;
    do begin
      @(posedge clk);
      n++;
      #1;
    end while (req_valid[r] && n < 100);
  endtask

  initial begin
    int n;
    rst_n = 1'b0;
    req_valid = '0; req_write = '0; req_add = '0; req_data = '0;
    seen_miss = '0; seen_sh = '0; seen_sm = '0;
    for (int k = 0; k < N; k++)
      for (int i = 0; i < NUM_LINES; i++) begin
        lines[k][i] = MESI_EMPTY_LINE;
        g_lines[k][i] = MESI_EMPTY_LINE;
      end
    for (int a = 0; a < MEM_DEPTH; a++) begin
      mem[a] = data_t'(8'h80 + a);
      g_mem[a] = mem[a];
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Directed: clocks for each kind of access (grant edge to response edge).
    single(0, 1'b0, 5'b01111, '0, n);   // memory read, E
    check("clocks read miss from memory", n, last_clocks + 1);
    check("read miss from memory", last_clocks, 5);
    single(0, 1'b0, 5'b01111, '0, n);   // read hit
    check("clocks read hit", n, 2);
    single(1, 1'b0, 5'b01111, '0, n);   // found in cache 2? no, in cache 0 (second look-up)
    check("clocks read from second peer", n, 4);
    single(0, 1'b1, 5'b01111, 8'h5A, n); // write hit in S: invalidate
    check("clocks write hit shared", n, 2);
    single(2, 1'b0, 5'b01111, '0, n);   // found in cache 0 (first look-up), dirty
    check("clocks read from first peer", n, 3);
    single(2, 1'b1, 5'b10111, 8'h11, n); // write miss, no victim write-back (line was S)
    check("clocks write miss", n, 3);
    single(2, 1'b1, 5'b00111, 8'h22, n); // write miss with dirty victim
    check("clocks write miss with write-back", n, 4);

    // Random concurrent requests.
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        if (!req_valid[k] && $urandom_range(0, 3) == 0) begin
          req_valid[k] = 1'b1;
          req_write[k] = ($urandom_range(0, 2) == 0);
          // A small address pool makes sharing and conflicts frequent.
          req_add[k]   = addr_t'({2'($urandom_range(0, 3)), 3'($urandom_range(0, 2))});
          req_data[k]  = data_t'($urandom);
        end
      end
    end
    wait (req_valid == '0);
    repeat (3) @(posedge clk);
    check("requests completed", completed > 1000, 1);
    $display("completed %0d requests", completed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
