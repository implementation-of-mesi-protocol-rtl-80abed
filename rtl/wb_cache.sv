// wb_cache -- 8-byte direct-mapped write-back cache with its controller, for a
// single processor in front of the 32-byte main memory.
//
// Each of the 8 lines holds {dirty, valid, tag[1:0], data[7:0]}. The CPU
// address splits into tag = add[4:3] and index = add[2:0]. The four cache
// operations behave as follows:
//   read hit   : cac_cpu_hit pulses with the line's byte on cac_cpu_data.
//   read miss  : cac_cpu_miss pulses; a dirty victim is first written back to
//                memory and its dirty bit cleared; the byte is read from
//                memory, placed in the line (clean, valid), and then
//                cac_cpu_hit pulses with the byte on cac_cpu_data.
//   write hit  : the byte is written into the line, the dirty bit is set and
//                cac_cpu_hit pulses.
//   write miss : cac_cpu_miss pulses; a dirty victim is written back; the new
//                byte is written into the line with the dirty bit set (write
//                allocate, no memory read since a line is one byte), and then
//                cac_cpu_hit pulses.
// Memory is only written when a dirty line is evicted (write-back policy).
//
// Interface and timing: a request (cpu_cac_read or cpu_cac_wrt high for at
// least one clock, with cpu_cac_add and cpu_cac_data) is taken on a rising
// edge while the cache is idle. The tags are compared in the next clock, so
// cac_cpu_hit (on a hit) or cac_cpu_miss (on a miss) rises one clock after
// the edge that took the request. After a miss, cac_cpu_hit follows one clock
// later for a write and two clocks later for a read (memory read, then fill);
// a dirty victim adds one clock for its write-back. cac_cpu_hit marks the
// end of every access; the CPU issues its next request after it.
// cac_cpu_data keeps the last byte read. The memory
// side (cac_mem_read, cac_mem_wrt, cac_mem_add, cac_mem_data, mem_cac_data)
// is the main_memory port: writes take effect on the edge, read data comes
// back one clock later. rst_n low loads the lines with INIT.
//
// The line layout, the port names and the four operations are the
// document's. The cycle timing, hit as the end-of-access mark after a write
// miss, and the reset load through INIT are this design's own choices.
module wb_cache
  import mesi_pkg::*;
#(
  parameter sc_image_t INIT = SC_EMPTY_IMAGE
) (
  input  logic  clk,
  input  logic  rst_n,
  // CPU side
  input  logic  cpu_cac_read,
  input  logic  cpu_cac_wrt,
  input  addr_t cpu_cac_add,
  input  data_t cpu_cac_data,
  output logic  cac_cpu_hit,
  output logic  cac_cpu_miss,
  output data_t cac_cpu_data,
  // memory side
  output logic  cac_mem_read,
  output logic  cac_mem_wrt,
  output addr_t cac_mem_add,
  output data_t cac_mem_data,
  input  data_t mem_cac_data
);

  typedef enum logic [2:0] {
    ST_IDLE,       // waiting for a request
    ST_LOOKUP,     // compare tags, serve a hit
    ST_WRITEBACK,  // write the dirty victim to memory
    ST_MEM_READ,   // issue the memory read
    ST_FILL,       // memory data arrives, fill the line
    ST_WRITE_ALLOC // place the written byte into the line
  } state_e;

  state_e   state_q;
  sc_line_t lines_q [NUM_LINES];
  logic     req_write_q;
  addr_t    req_add_q;
  data_t    req_data_q;

  index_t   cpu_index;
  tag_t     cpu_tag;
  sc_line_t cur_line;
  logic     tag_hit;

  assign cpu_index = addr_index(req_add_q);
  assign cpu_tag   = addr_tag(req_add_q);
  assign cur_line  = lines_q[cpu_index];
  assign tag_hit   = cur_line.valid && (cur_line.tag == cpu_tag);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= ST_IDLE;
      for (int i = 0; i < NUM_LINES; i++) lines_q[i] <= INIT[i];
      req_write_q  <= 1'b0;
      req_add_q    <= '0;
      req_data_q   <= '0;
      cac_cpu_hit  <= 1'b0;
      cac_cpu_miss <= 1'b0;
      cac_cpu_data <= '0;
    end else begin
      cac_cpu_hit  <= 1'b0;
      cac_cpu_miss <= 1'b0;
      unique case (state_q)
        ST_IDLE: begin
          if (cpu_cac_read || cpu_cac_wrt) begin
            req_write_q <= cpu_cac_wrt;
            req_add_q   <= cpu_cac_add;
            req_data_q  <= cpu_cac_data;
            state_q     <= ST_LOOKUP;
          end
        end
        ST_LOOKUP: begin
          if (tag_hit) begin
            cac_cpu_hit <= 1'b1;
            if (req_write_q) begin
              lines_q[cpu_index].dirty <= 1'b1;
              lines_q[cpu_index].data  <= req_data_q;
            end else begin
              cac_cpu_data <= cur_line.data;
            end
            state_q <= ST_IDLE;
          end else begin
            cac_cpu_miss <= 1'b1;
            if (cur_line.valid && cur_line.dirty) state_q <= ST_WRITEBACK;
            else if (req_write_q)                 state_q <= ST_WRITE_ALLOC;
            else                                  state_q <= ST_MEM_READ;
          end
        end
        ST_WRITEBACK: begin
          lines_q[cpu_index].dirty <= 1'b0;
          state_q <= req_write_q ? ST_WRITE_ALLOC : ST_MEM_READ;
        end
        ST_MEM_READ: state_q <= ST_FILL;
        ST_FILL: begin
          lines_q[cpu_index] <= '{dirty: 1'b0, valid: 1'b1, tag: cpu_tag, data: mem_cac_data};
          cac_cpu_data <= mem_cac_data;
          cac_cpu_hit  <= 1'b1;
          state_q      <= ST_IDLE;
        end
        ST_WRITE_ALLOC: begin
          lines_q[cpu_index] <= '{dirty: 1'b1, valid: 1'b1, tag: cpu_tag, data: req_data_q};
          cac_cpu_hit <= 1'b1;
          state_q     <= ST_IDLE;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  // Memory port: write the victim back, or read the requested byte.
  always_comb begin
    cac_mem_read = (state_q == ST_MEM_READ);
    cac_mem_wrt  = (state_q == ST_WRITEBACK);
    cac_mem_add  = (state_q == ST_WRITEBACK) ? {cur_line.tag, cpu_index} : req_add_q;
    cac_mem_data = cur_line.data;
  end

  a_no_read_and_write : assert property (@(posedge clk) disable iff (!rst_n)
                                         !(cpu_cac_read && cpu_cac_wrt))
    else $error("wb_cache: read and write requested together");

endmodule
