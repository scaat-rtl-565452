// scaat_cache: parameterised direct-mapped / k-way set-associative cache.
//
// The cache the SCAAT unit is fitted to.  CACHE_LINES lines of MEM_DATA_BITS
// are organised in CACHE_SETS = CACHE_LINES/ASSOCIATIVITY sets.  The CPU
// address is a word address {tag, index, offset}: OFFSET_BITS =
// log2(MEM_DATA_BITS/CPU_DATA_BITS) select the word in a line, INDEX_BITS =
// log2(CACHE_SETS) the set, and the remaining TAG_BITS are stored.  The
// memory address is the line address {tag, index} (MEM_ADDR_BITS =
// CPU_ADDR_BITS - OFFSET_BITS).
//
// Policy (this design's choice; the document only names the cache and its
// parameters): write-through, no write-allocate, allocate on read miss,
// least-recently-used replacement inside a set (an invalid way is filled
// first).  Tag, valid and data arrays are read combinationally at request
// time.
//
// CPU side: a request is accepted in a cycle with cpu_req && cpu_rdy; the
// address and data are sampled then.  cpu_rdy is high only when idle.
//   read hit   cpu_rstb/cpu_rdata one cycle after acceptance (2 cycles)
//   read miss  line fetched from memory, then cpu_rstb/cpu_rdata
//   write      word written into the line on a hit, then a write-through
//              request to memory; cpu_rdy returns after the memory accepted
//              it (3 cycles with a memory that is always ready)
// cache_hit / cache_miss pulse in the acceptance cycle of every access.
// Assertions check the memory-side handshake rules.
// Memory side: mem_req with mem_write/mem_addr/mem_wdata/mem_wmask (one bit
// per CPU word in the line) is held until mem_rdy; a read's line arrives
// later with mem_rstb, not in the cycle the request is accepted.
module scaat_cache #(
  parameter int unsigned CACHE_LINES   = 256,
  parameter int unsigned ASSOCIATIVITY = 4,
  parameter int unsigned CPU_ADDR_BITS = 16,
  parameter int unsigned CPU_DATA_BITS = 32,
  parameter int unsigned MEM_DATA_BITS = 128,
  localparam int unsigned CACHE_SETS    = CACHE_LINES / ASSOCIATIVITY,
  localparam int unsigned WORDS         = MEM_DATA_BITS / CPU_DATA_BITS,
  localparam int unsigned OFFSET_BITS   = $clog2(WORDS),
  localparam int unsigned INDEX_BITS    = $clog2(CACHE_SETS),
  localparam int unsigned TAG_BITS      = CPU_ADDR_BITS - INDEX_BITS - OFFSET_BITS,
  localparam int unsigned MEM_ADDR_BITS = CPU_ADDR_BITS - OFFSET_BITS
) (
  input  logic                     clk,
  input  logic                     rst,
  // CPU side
  input  logic                     cpu_req,
  input  logic                     cpu_write,
  input  logic [CPU_ADDR_BITS-1:0] cpu_addr,
  input  logic [CPU_DATA_BITS-1:0] cpu_wdata,
  output logic                     cpu_rdy,
  output logic                     cpu_rstb,
  output logic [CPU_DATA_BITS-1:0] cpu_rdata,
  // memory side
  output logic                     mem_req,
  output logic                     mem_write,
  output logic [MEM_ADDR_BITS-1:0] mem_addr,
  output logic [MEM_DATA_BITS-1:0] mem_wdata,
  output logic [WORDS-1:0]         mem_wmask,
  input  logic                     mem_rdy,
  input  logic                     mem_rstb,
  input  logic [MEM_DATA_BITS-1:0] mem_rdata,
  // access outcome
  output logic                     cache_hit,
  output logic                     cache_miss
);

  localparam int unsigned WAY_BITS = (ASSOCIATIVITY > 1) ? $clog2(ASSOCIATIVITY) : 1;

  typedef enum logic [1:0] {S_IDLE, S_RD_REQ, S_RD_WAIT, S_WR_REQ} state_e;

  typedef logic [WAY_BITS-1:0] way_t;

  // storage
  logic [TAG_BITS-1:0]      tag_q   [CACHE_SETS][ASSOCIATIVITY];
  logic [MEM_DATA_BITS-1:0] data_q  [CACHE_SETS][ASSOCIATIVITY];
  logic [ASSOCIATIVITY-1:0] valid_q [CACHE_SETS];
  way_t                     age_q   [CACHE_SETS][ASSOCIATIVITY]; // 0 = most recent

  state_e                   state_q;
  logic [CPU_ADDR_BITS-1:0] addr_q;
  logic [CPU_DATA_BITS-1:0] wdata_q;
  way_t                     victim_q;

  // address fields of the incoming request
  logic [TAG_BITS-1:0]    req_tag;
  logic [INDEX_BITS-1:0]  req_set;
  logic [OFFSET_BITS-1:0] req_off;
  assign req_tag = cpu_addr[CPU_ADDR_BITS-1 -: TAG_BITS];
  assign req_set = cpu_addr[OFFSET_BITS +: INDEX_BITS];
  assign req_off = cpu_addr[OFFSET_BITS-1:0];

  // address fields of the pending request
  logic [TAG_BITS-1:0]    pend_tag;
  logic [INDEX_BITS-1:0]  pend_set;
  logic [OFFSET_BITS-1:0] pend_off;
  assign pend_tag = addr_q[CPU_ADDR_BITS-1 -: TAG_BITS];
  assign pend_set = addr_q[OFFSET_BITS +: INDEX_BITS];
  assign pend_off = addr_q[OFFSET_BITS-1:0];

  // lookup
  logic accept;
  logic hit;
  way_t hit_way;
  way_t victim;
  logic found_free;

  assign accept = cpu_req && (state_q == S_IDLE);

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = ASSOCIATIVITY - 1; w >= 0; w--) begin
      if (valid_q[req_set][w] && tag_q[req_set][w] == req_tag) begin
        hit     = 1'b1;
        hit_way = way_t'(w);
      end
    end
  end

  always_comb begin
    found_free = 1'b0;
    victim     = '0;
    for (int w = ASSOCIATIVITY - 1; w >= 0; w--) begin
      if (!valid_q[req_set][w]) begin
        found_free = 1'b1;
        victim     = way_t'(w);
      end
    end
    if (!found_free) begin
      for (int w = 0; w < ASSOCIATIVITY; w++) begin
        if (age_q[req_set][w] == way_t'(ASSOCIATIVITY - 1)) victim = way_t'(w);
      end
    end
  end

  // LRU bookkeeping: at most one way is touched per cycle (a hit in IDLE or
  // a fill in S_RD_WAIT); it becomes age 0 and every younger way ages by one.
  logic                  touch_en;
  logic [INDEX_BITS-1:0] touch_set;
  way_t                  touch_way;

  always_comb begin
    touch_en  = 1'b0;
    touch_set = req_set;
    touch_way = hit_way;
    if (state_q == S_IDLE && accept && hit) begin
      touch_en = 1'b1;
    end else if (state_q == S_RD_WAIT && mem_rstb) begin
      touch_en  = 1'b1;
      touch_set = pend_set;
      touch_way = victim_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < CACHE_SETS; s++) begin
        for (int w = 0; w < ASSOCIATIVITY; w++) age_q[s][w] <= way_t'(w);
      end
    end else if (touch_en) begin
      for (int v = 0; v < ASSOCIATIVITY; v++) begin
        if (age_q[touch_set][v] < age_q[touch_set][touch_way])
          age_q[touch_set][v] <= age_q[touch_set][v] + way_t'(1);
      end
      age_q[touch_set][touch_way] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q  <= S_IDLE;
      cpu_rstb <= 1'b0;
      for (int s = 0; s < CACHE_SETS; s++) valid_q[s] <= '0;
    end else begin
      cpu_rstb <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (accept) begin
            addr_q   <= cpu_addr;
            wdata_q  <= cpu_wdata;
            victim_q <= victim;
            if (cpu_write) begin
              if (hit) begin
                data_q[req_set][hit_way][req_off*CPU_DATA_BITS +: CPU_DATA_BITS] <= cpu_wdata;
              end
              state_q <= S_WR_REQ;
            end else if (hit) begin
              cpu_rdata <= data_q[req_set][hit_way][req_off*CPU_DATA_BITS +: CPU_DATA_BITS];
              cpu_rstb  <= 1'b1;
            end else begin
              state_q <= S_RD_REQ;
            end
          end
        end
        S_RD_REQ: if (mem_rdy) state_q <= S_RD_WAIT;
        S_RD_WAIT: begin
          if (mem_rstb) begin
            data_q[pend_set][victim_q]  <= mem_rdata;
            tag_q[pend_set][victim_q]   <= pend_tag;
            valid_q[pend_set][victim_q] <= 1'b1;
            cpu_rdata <= mem_rdata[pend_off*CPU_DATA_BITS +: CPU_DATA_BITS];
            cpu_rstb  <= 1'b1;
            state_q   <= S_IDLE;
          end
        end
        S_WR_REQ: if (mem_rdy) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign cpu_rdy    = (state_q == S_IDLE);
  assign cache_hit  = accept && hit;
  assign cache_miss = accept && !hit;

  assign mem_req   = (state_q == S_RD_REQ) || (state_q == S_WR_REQ);
  assign mem_write = (state_q == S_WR_REQ);
  assign mem_addr  = addr_q[CPU_ADDR_BITS-1:OFFSET_BITS];
  assign mem_wdata = {WORDS{wdata_q}};
  always_comb begin
    mem_wmask = '0;
    if (state_q == S_WR_REQ) mem_wmask[pend_off] = 1'b1;
  end

  // memory-side handshake: a request is held, unchanged, until accepted;
  // read data only arrives while a read is outstanding
  a_mem_req_held: assert property (@(posedge clk) disable iff (rst)
    mem_req && !mem_rdy |=> mem_req && $stable(mem_addr) && $stable(mem_write));
  a_mem_rstb_expected: assert property (@(posedge clk) disable iff (rst)
    mem_rstb |-> state_q == S_RD_WAIT);

  initial begin
    assert (CACHE_LINES % ASSOCIATIVITY == 0 && CACHE_SETS >= 2 && 2 ** INDEX_BITS == CACHE_SETS)
      else $fatal(1, "scaat_cache: CACHE_SETS must be a power of two >= 2");
    assert (WORDS >= 2 && 2 ** OFFSET_BITS == WORDS)
      else $fatal(1, "scaat_cache: MEM_DATA_BITS/CPU_DATA_BITS must be a power of two >= 2");
    assert (2 ** WAY_BITS == ASSOCIATIVITY || ASSOCIATIVITY == 1)
      else $fatal(1, "scaat_cache: ASSOCIATIVITY must be a power of two");
  end

endmodule
