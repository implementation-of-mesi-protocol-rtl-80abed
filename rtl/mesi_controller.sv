// mesi_controller -- central coherence controller of the MESI system. It sits
// between the caches and main memory and serves one cache request at a time.
//
// A round-robin arbiter picks a cache with a pending request. The request's
// index and tag are put on the coherence bus (bus_index, bus_tag), where
// every cache shows its line at that index and whether it holds the address
// (bus_match). Then, for the requesting cache R:
//   read hit            : data returned, state unchanged.
//   write hit in M or E : line written, dirty set, state -> M. No bus action.
//   write hit in S      : line written, dirty set, state -> M; every other
//                         copy is invalidated (state -> I, dirty cleared) and
//                         the new byte is also written to main memory.
//   any miss            : rsp_miss to R. If R's victim line is dirty and not
//                         Invalid, it is written back to memory first.
//   read miss           : the other caches are checked one per clock, in the
//                         order R+1, R+2, ... (so A checks B then C). The
//                         first that holds the address supplies the byte
//                         (writing it back to memory first if it is dirty);
//                         both lines end in S and the supplier's dirty bit is
//                         cleared. If none holds it, the byte is read from
//                         memory and R's line becomes E.
//   write miss          : every other copy is invalidated and R's line is
//                         written with the new byte in M, dirty set.
// Every access ends with rsp_hit to R (with the byte on rsp_data for a read).
// During the serial check, snp_hit[k] / snp_miss[k] pulse for each cache k
// checked, to show the outcome of each look-up.
//
// Timing: request taken from IDLE on one edge; the look-up is decided on the
// next. A hit ends there. A miss adds one clock for a victim write-back, one
// clock per cache checked, and two clocks (read then fill) for a memory read;
// a write miss adds one clock for the invalidate-and-write.
//
// Following the document: the serial search of the other caches before
// memory, E after a fill from memory, S for both caches after a cache-to-
// cache fill, invalidation of all other copies on a write, M with the dirty
// bit set after a write, and the write to memory on a write to a shared line.
// This design's own choices: the round-robin arbiter, one request at a time,
// the cycle timing, writing back a dirty supplier, and invalidation of
// copies on a write miss (the document states the write rule for writes in
// general and shows it only for a write hit).
module mesi_controller
  import mesi_pkg::*;
#(
  parameter int NUM_CACHES = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // pending requests of the caches
  input  logic        [NUM_CACHES-1:0] req_valid,
  input  logic        [NUM_CACHES-1:0] req_write,
  input  addr_t       [NUM_CACHES-1:0] req_add,
  input  data_t       [NUM_CACHES-1:0] req_data,
  // coherence bus
  output index_t                       bus_index,
  output tag_t                         bus_tag,
  input  mesi_line_t  [NUM_CACHES-1:0] bus_line,
  input  logic        [NUM_CACHES-1:0] bus_match,
  output logic        [NUM_CACHES-1:0] upd_en,
  output mesi_line_t  [NUM_CACHES-1:0] upd_line,
  output logic        [NUM_CACHES-1:0] rsp_hit,
  output logic        [NUM_CACHES-1:0] rsp_miss,
  output data_t                        rsp_data,
  output logic        [NUM_CACHES-1:0] snp_hit,
  output logic        [NUM_CACHES-1:0] snp_miss,
  // main memory
  output logic                         mem_read,
  output logic                         mem_wrt,
  output addr_t                        mem_add,
  output data_t                        mem_wdata,
  input  data_t                        mem_rdata
);

  localparam int CW = (NUM_CACHES > 1) ? $clog2(NUM_CACHES) : 1;
  typedef logic [CW-1:0] cid_t;

  typedef enum logic [2:0] {
    ST_IDLE,        // arbitrate
    ST_LOOKUP,      // check the requesting cache
    ST_WRITEBACK,   // write the requester's dirty victim to memory
    ST_SNOOP,       // check the other caches, one per clock
    ST_MEM_READ,    // read the byte from memory
    ST_FILL,        // place the memory byte in the requester, state E
    ST_WRITE_MISS   // invalidate other copies, write the line in M
  } state_e;

  state_e state_q;
  cid_t   cur_q;      // requesting cache
  cid_t   last_q;     // last cache served, for round-robin
  cid_t   peer_q;     // cache being checked in ST_SNOOP
  cid_t   grant;
  logic   grant_any;
  logic   cur_write;
  addr_t  cur_add_q;
  data_t  cur_data_q;
  mesi_line_t own;
  mesi_line_t peer;

  function automatic cid_t next_cid(cid_t c);
    return (int'(c) == NUM_CACHES - 1) ? cid_t'(0) : cid_t'(c + cid_t'(1));
  endfunction

  // Round-robin: the first pending cache after the one served last.
  always_comb begin
    cid_t c;
    grant     = '0;
    grant_any = 1'b0;
    c         = last_q;
    for (int k = 0; k < NUM_CACHES; k++) begin
      c = next_cid(c);
      if (!grant_any && req_valid[c]) begin
        grant     = c;
        grant_any = 1'b1;
      end
    end
  end

  assign bus_index = addr_index(cur_add_q);
  assign bus_tag   = addr_tag(cur_add_q);
  assign cur_write = req_write[cur_q];
  assign own       = bus_line[cur_q];
  assign peer      = bus_line[peer_q];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      cur_q      <= '0;
      last_q     <= cid_t'(NUM_CACHES - 1);
      peer_q     <= '0;
      cur_add_q  <= '0;
      cur_data_q <= '0;
    end else begin
      unique case (state_q)
        ST_IDLE: begin
          if (grant_any) begin
            cur_q      <= grant;
            last_q     <= grant;
            cur_add_q  <= req_add[grant];
            cur_data_q <= req_data[grant];
            state_q    <= ST_LOOKUP;
          end
        end
        ST_LOOKUP: begin
          peer_q <= next_cid(cur_q);
          if (bus_match[cur_q])                           state_q <= ST_IDLE;
          else if (own.valid && own.dirty && own.state != MESI_I) state_q <= ST_WRITEBACK;
          else if (cur_write)                             state_q <= ST_WRITE_MISS;
          else if (NUM_CACHES > 1)                        state_q <= ST_SNOOP;
          else                                            state_q <= ST_MEM_READ;
        end
        ST_WRITEBACK: begin
          if (cur_write)           state_q <= ST_WRITE_MISS;
          else if (NUM_CACHES > 1) state_q <= ST_SNOOP;
          else                     state_q <= ST_MEM_READ;
        end
        ST_SNOOP: begin
          if (bus_match[peer_q])               state_q <= ST_IDLE;
          else if (next_cid(peer_q) == cur_q)  state_q <= ST_MEM_READ;
          else                                 peer_q  <= next_cid(peer_q);
        end
        ST_MEM_READ:   state_q <= ST_FILL;
        ST_FILL:       state_q <= ST_IDLE;
        ST_WRITE_MISS: state_q <= ST_IDLE;
        default:       state_q <= ST_IDLE;
      endcase
    end
  end

  // Line updates, responses and memory accesses of the current state.
  always_comb begin
    mesi_line_t written;
    upd_en    = '0;
    upd_line  = '0;
    rsp_hit   = '0;
    rsp_miss  = '0;
    rsp_data  = '0;
    snp_hit   = '0;
    snp_miss  = '0;
    mem_read  = 1'b0;
    mem_wrt   = 1'b0;
    mem_add   = cur_add_q;
    mem_wdata = cur_data_q;
    written   = '{state: MESI_M, dirty: 1'b1, valid: 1'b1, tag: bus_tag, data: cur_data_q};

    unique case (state_q)
      ST_LOOKUP: begin
        if (bus_match[cur_q]) begin
          rsp_hit[cur_q] = 1'b1;
          rsp_data       = own.data;
          if (cur_write) begin
            upd_en[cur_q]   = 1'b1;
            upd_line[cur_q] = written;
            if (own.state == MESI_S) begin
              // Write to a shared line: invalidate the other copies and
              // write the new byte to memory.
              for (int k = 0; k < NUM_CACHES; k++) begin
                if (k != int'(cur_q) && bus_match[k]) begin
                  upd_en[k]         = 1'b1;
                  upd_line[k]       = bus_line[k];
                  upd_line[k].state = MESI_I;
                  upd_line[k].dirty = 1'b0;
                end
              end
              mem_wrt = 1'b1;
            end
          end
        end else begin
          rsp_miss[cur_q] = 1'b1;
        end
      end
      ST_WRITEBACK: begin
        mem_wrt   = 1'b1;
        mem_add   = {own.tag, bus_index};
        mem_wdata = own.data;
        upd_en[cur_q]         = 1'b1;
        upd_line[cur_q]       = own;
        upd_line[cur_q].dirty = 1'b0;
      end
      ST_SNOOP: begin
        if (bus_match[peer_q]) begin
          snp_hit[peer_q] = 1'b1;
          if (peer.dirty) begin
            mem_wrt   = 1'b1;
            mem_wdata = peer.data;
          end
          upd_en[peer_q]         = 1'b1;
          upd_line[peer_q]       = peer;
          upd_line[peer_q].state = MESI_S;
          upd_line[peer_q].dirty = 1'b0;
          upd_en[cur_q]   = 1'b1;
          upd_line[cur_q] = '{state: MESI_S, dirty: 1'b0, valid: 1'b1,
                              tag: bus_tag, data: peer.data};
          rsp_hit[cur_q]  = 1'b1;
          rsp_data        = peer.data;
        end else begin
          snp_miss[peer_q] = 1'b1;
        end
      end
      ST_MEM_READ: mem_read = 1'b1;
      ST_FILL: begin
        upd_en[cur_q]   = 1'b1;
        upd_line[cur_q] = '{state: MESI_E, dirty: 1'b0, valid: 1'b1,
                            tag: bus_tag, data: mem_rdata};
        rsp_hit[cur_q]  = 1'b1;
        rsp_data        = mem_rdata;
      end
      ST_WRITE_MISS: begin
        for (int k = 0; k < NUM_CACHES; k++) begin
          if (k != int'(cur_q) && bus_match[k]) begin
            upd_en[k]         = 1'b1;
            upd_line[k]       = bus_line[k];
            upd_line[k].state = MESI_I;
            upd_line[k].dirty = 1'b0;
          end
        end
        upd_en[cur_q]   = 1'b1;
        upd_line[cur_q] = written;
        rsp_hit[cur_q]  = 1'b1;
      end
      default: ;
    endcase
  end

  // Coherence rules visible on the bus.
  a_one_owner : assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == ST_LOOKUP) |->
        !(bus_match[cur_q] && (own.state inside {MESI_M, MESI_E}) &&
          ($countones(bus_match) > 1)))
    else $error("mesi_controller: M/E line with another valid copy");
  a_onehot_hit : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rsp_hit))
    else $error("mesi_controller: more than one rsp_hit");
  a_mem_one_access : assert property (@(posedge clk) disable iff (!rst_n) !(mem_read && mem_wrt))
    else $error("mesi_controller: memory read and write together");

endmodule
