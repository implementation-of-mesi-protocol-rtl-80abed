// mesi_cache -- one processor's 8-line direct-mapped MESI cache.
//
// Every line holds {state[1:0], dirty, valid, tag[1:0], data[7:0]}. The cache
// itself decides nothing about coherence: it latches its CPU's request,
// offers it to the central mesi_controller, and gives the controller a view
// of the line at the index on the shared coherence bus (bus_index) together
// with a tag-match flag (bus_match: valid, not Invalid, tag == bus_tag). The
// controller answers with line updates (upd_en/upd_line, written at
// bus_index) and with rsp_miss / rsp_hit pulses, which this cache passes to
// its CPU as cac_cpu_miss / cac_cpu_hit; on rsp_hit of a read it also loads
// rsp_data into cac_cpu_data.
//
// Interface and timing: the CPU raises cpu_cac_read or cpu_cac_wrt (with
// cpu_cac_add and cpu_cac_data) for at least one clock; the request is
// latched on the first rising edge where none is pending and stays pending
// (req_valid) until the controller's rsp_hit, which ends the access. The CPU
// issues its next request after cac_cpu_hit. A request raised while one is
// pending is ignored. rst_n low loads the lines with INIT and clears the
// request.
//
// The line layout, the state encoding and the CPU port names follow the
// document; splitting storage from a central controller and the
// pending-request handshake are this design's own choices.
module mesi_cache
  import mesi_pkg::*;
#(
  parameter mesi_image_t INIT = MESI_EMPTY_IMAGE
) (
  input  logic       clk,
  input  logic       rst_n,
  // CPU side
  input  logic       cpu_cac_read,
  input  logic       cpu_cac_wrt,
  input  addr_t      cpu_cac_add,
  input  data_t      cpu_cac_data,
  output logic       cac_cpu_hit,
  output logic       cac_cpu_miss,
  output data_t      cac_cpu_data,
  // pending request, to the controller
  output logic       req_valid,
  output logic       req_write,
  output addr_t      req_add,
  output data_t      req_data,
  // coherence bus view
  input  index_t     bus_index,
  input  tag_t       bus_tag,
  output mesi_line_t bus_line,
  output logic       bus_match,
  // updates and responses from the controller
  input  logic       upd_en,
  input  mesi_line_t upd_line,
  input  logic       rsp_hit,
  input  logic       rsp_miss,
  input  data_t      rsp_data
);

  mesi_line_t lines_q [NUM_LINES];

  assign bus_line  = lines_q[bus_index];
  assign bus_match = mesi_holds(bus_line, bus_tag);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_LINES; i++) lines_q[i] <= INIT[i];
    end else if (upd_en) begin
      lines_q[bus_index] <= upd_line;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_valid    <= 1'b0;
      req_write    <= 1'b0;
      req_add      <= '0;
      req_data     <= '0;
      cac_cpu_hit  <= 1'b0;
      cac_cpu_miss <= 1'b0;
      cac_cpu_data <= '0;
    end else begin
      cac_cpu_hit  <= rsp_hit;
      cac_cpu_miss <= rsp_miss;
      if (rsp_hit) begin
        req_valid <= 1'b0;
        if (!req_write) cac_cpu_data <= rsp_data;
      end else if (!req_valid && (cpu_cac_read || cpu_cac_wrt)) begin
        req_valid <= 1'b1;
        req_write <= cpu_cac_wrt;
        req_add   <= cpu_cac_add;
        req_data  <= cpu_cac_data;
      end
    end
  end

  a_rsp_needs_req : assert property (@(posedge clk) disable iff (!rst_n)
                                     (rsp_hit || rsp_miss) |-> req_valid)
    else $error("mesi_cache: response without a pending request");

  a_no_read_and_write : assert property (@(posedge clk) disable iff (!rst_n)
                                         !(cpu_cac_read && cpu_cac_wrt))
    else $error("mesi_cache: read and write requested together");

endmodule
