// mesi_cache_tb -- self-checking test of one MESI cache on its own, with this
// testbench playing the controller. Checks: reset contents seen on the bus
// view, the tag-match flag for every state/valid/tag combination, line
// updates, request latching (and that a second request is ignored while one
// is pending), and the CPU-side hit/miss pulses and read data one clock after
// the controller's responses.
module mesi_cache_tb;
  import mesi_pkg::*;

  function automatic mesi_image_t gen_init();
    mesi_image_t c = MESI_EMPTY_IMAGE;
    c[7] = mesi_line_t'(14'b01_0_1_00_00010100);   // E, tag 00
    c[6] = mesi_line_t'(14'b01_0_1_01_00000010);   // E, tag 01
    c[0] = mesi_line_t'(14'b01_0_1_11_00000100);   // E, tag 11
    c[4] = mesi_line_t'(14'b10_0_1_11_00000101);   // S, tag 11
    return c;
  endfunction
  localparam mesi_image_t INIT = gen_init();

  logic       clk = 1'b0;
  logic       rst_n;
  logic       cpu_cac_read, cpu_cac_wrt;
  addr_t      cpu_cac_add;
  data_t      cpu_cac_data;
  logic       cac_cpu_hit, cac_cpu_miss;
  data_t      cac_cpu_data;
  logic       req_valid, req_write;
  addr_t      req_add;
  data_t      req_data;
  index_t     bus_index;
  tag_t       bus_tag;
  mesi_line_t bus_line;
  logic       bus_match;
  logic       upd_en;
  mesi_line_t upd_line;
  logic       rsp_hit, rsp_miss;
  data_t      rsp_data;
  int         checks = 0, failures = 0;

  mesi_cache #(.INIT(INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  mesi_line_t model [NUM_LINES];

  initial begin
    rst_n = 1'b0;
    cpu_cac_read = 0; cpu_cac_wrt = 0; cpu_cac_add = '0; cpu_cac_data = '0;
    bus_index = '0; bus_tag = '0; upd_en = 0; upd_line = '0;
    rsp_hit = 0; rsp_miss = 0; rsp_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Reset contents and tag match.
    for (int i = 0; i < NUM_LINES; i++) begin
      model[i] = INIT[i];
      for (int t = 0; t < 4; t++) begin
        bus_index = index_t'(i); bus_tag = tag_t'(t);
        #1;
        check($sformatf("reset line %0d", i), bus_line, INIT[i]);
        check($sformatf("match %0d/%0d", i, t), bus_match,
              INIT[i].valid && INIT[i].state != MESI_I && INIT[i].tag == tag_t'(t));
      end
    end
    check("no request after reset", req_valid, 0);

    // Random line updates, and match against every state.
    for (int n = 0; n < 300; n++) begin
      mesi_line_t l;
      index_t     i;
      @(negedge clk);
      i = index_t'($urandom_range(0, NUM_LINES - 1));
      l = mesi_line_t'($urandom);
      bus_index = i; upd_en = ($urandom_range(0, 1) == 1); upd_line = l;
      if (upd_en) model[i] = l;
      @(negedge clk);
      upd_en = 0;
      bus_tag = tag_t'($urandom_range(0, 3));
      #1;
      check("updated line", bus_line, model[i]);
      check("match after update", bus_match,
            model[i].valid && model[i].state != MESI_I && model[i].tag == bus_tag);
    end

    // A read request is latched and held; a second one is ignored.
    @(negedge clk);
    cpu_cac_read = 1; cpu_cac_add = 5'b10111; cpu_cac_data = 8'h33;
    @(negedge clk);
    cpu_cac_read = 0;
    check("read pending", req_valid, 1);
    check("read is not write", req_write, 0);
    check("read address", req_add, 5'b10111);
    cpu_cac_wrt = 1; cpu_cac_add = 5'b00001; cpu_cac_data = 8'h44;
    @(negedge clk);
    cpu_cac_wrt = 0;
    check("second request ignored: address", req_add, 5'b10111);
    check("second request ignored: kind", req_write, 0);
    rsp_miss = 1;
    @(negedge clk);
    rsp_miss = 0;
    check("miss pulse", cac_cpu_miss, 1);
    check("no hit on miss", cac_cpu_hit, 0);
    check("still pending after miss", req_valid, 1);
    rsp_hit = 1; rsp_data = 8'b0000_1001;
    @(negedge clk);
    rsp_hit = 0; rsp_data = '0;
    check("hit pulse", cac_cpu_hit, 1);
    check("miss pulse ends", cac_cpu_miss, 0);
    check("read data", cac_cpu_data, 8'b0000_1001);
    check("request done", req_valid, 0);
    @(negedge clk);
    check("hit is one clock", cac_cpu_hit, 0);

    // A write request keeps cac_cpu_data unchanged.
    cpu_cac_wrt = 1; cpu_cac_add = 5'b11000; cpu_cac_data = 8'h01;
    @(negedge clk);
    cpu_cac_wrt = 0;
    check("write pending", req_valid, 1);
    check("write kind", req_write, 1);
    check("write data", req_data, 8'h01);
    check("write address", req_add, 5'b11000);
    rsp_hit = 1; rsp_data = 8'hEE;
    @(negedge clk);
    rsp_hit = 0;
    check("write hit pulse", cac_cpu_hit, 1);
    check("write leaves read data", cac_cpu_data, 8'b0000_1001);
    check("write done", req_valid, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
