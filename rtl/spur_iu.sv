// Instruction unit: on-chip instruction cache with prefetch.
//
// 128 instruction words (512 bytes), direct-mapped as 16 blocks of 8
// words, addressed by the virtual word address. Each word has its own
// valid bit, so any subset of a block may be present. A separate tag
// array holds 16 tags of 24 bits: 23 address bits plus the kernel-mode
// bit of the fetch (the use of the 24th bit is this design's choice).
//
// Two state machines run it. The fetch machine compares the tag and the
// word's valid bit in the cycle the execution unit asks for an
// instruction. On a hit the word is delivered at once. On a demand miss
// it requests that single word from the external cache in the next
// cycle; when it arrives it is written into the cache and delivered the
// cycle after, so a miss costs two cycles when the port is free. If the
// block's tag differs, the tag is replaced and all other words of the
// block are invalidated.
// The prefetch machine then fetches the following words of the same
// block, one per cycle, through the external port at the lowest priority,
// while the execution unit keeps fetching from the cache. It stops at the
// end of the block, at the next demand miss, when a data access takes
// the port, or when the MMU/CC ignores a prefetch that missed.
//
// Modes (two KPSW bits): disabled (every fetch goes to the external cache
// through a one-word buffer, valid bits are cleared), enabled without
// prefetching, and enabled with prefetching (normal).
module spur_iu
  import spur_pkg::*;
#(
  parameter int unsigned NBLOCKS = 16,
  parameter int unsigned BWORDS  = 8
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,          // cache enabled
  input  logic        pf_en,       // prefetch enabled
  input  logic        kernel,
  // execution unit side
  input  logic        fetch_req,
  input  logic [29:0] fetch_pc,    // word address
  output logic        inst_valid,
  output logic [31:0] inst,
  // external port (through the MMU/CC interface)
  output logic        if_req,
  output logic [29:0] if_addr,
  input  logic        if_done,
  output logic        pf_req,
  output logic [29:0] pf_addr,
  input  logic        pf_done,
  input  logic        pf_stop,
  input  logic [31:0] ext_inst,
  // observation (state bits brought out to pins)
  output logic        st_fetching,
  output logic        st_prefetching
);
  localparam int unsigned OFFW = $clog2(BWORDS);
  localparam int unsigned IDXW = $clog2(NBLOCKS);
  localparam int unsigned TAGW = 30 - OFFW - IDXW;   // 23 address bits
  localparam int unsigned NWORDS = NBLOCKS * BWORDS;

  typedef enum logic {F_IDLE, F_MISS} fstate_t;
  typedef enum logic {P_IDLE, P_ACTIVE} pstate_t;

  logic [31:0]         data_arr [NWORDS];
  logic [TAGW:0]       tag_arr  [NBLOCKS];   // {kernel, address tag}
  logic [NWORDS-1:0]   valid;

  fstate_t     fstate;
  pstate_t     pstate;
  logic [29:0] miss_pc;
  logic [29:0] pf_pc;
  logic [31:0] buf_inst;
  logic [29:0] buf_pc;
  logic        buf_valid;
  logic        buf_k;

  function automatic logic [IDXW-1:0] idx_of(logic [29:0] a);
    return a[OFFW +: IDXW];
  endfunction
  function automatic logic [TAGW:0] tag_of(logic [29:0] a, logic k);
    return {k, a[29 -: TAGW]};
  endfunction
  function automatic logic [OFFW+IDXW-1:0] word_of(logic [29:0] a);
    return a[OFFW+IDXW-1:0];
  endfunction

  logic cache_hit, buf_hit;
  assign cache_hit = en && valid[word_of(fetch_pc)] &&
                     (tag_arr[idx_of(fetch_pc)] == tag_of(fetch_pc, kernel));
  assign buf_hit   = buf_valid && (buf_pc == fetch_pc) && (buf_k == kernel);

  assign inst_valid = fetch_req && (fstate == F_IDLE) && (cache_hit || buf_hit);
  assign inst       = buf_hit ? buf_inst : data_arr[word_of(fetch_pc)];

  assign if_req  = (fstate == F_MISS);
  assign if_addr = miss_pc;
  assign pf_addr = pf_pc;
  // a word that is already valid is skipped without using the port
  assign pf_req  = (pstate == P_ACTIVE) && !valid[word_of(pf_pc)];

  assign st_fetching    = (fstate == F_MISS);
  assign st_prefetching = (pstate == P_ACTIVE);

  logic demand_miss;
  assign demand_miss = fetch_req && (fstate == F_IDLE) && !cache_hit && !buf_hit;

  always_ff @(posedge clk) begin
    if (en && fstate == F_MISS && if_done)
      data_arr[word_of(miss_pc)] <= ext_inst;
    else if (pstate == P_ACTIVE && pf_done)
      data_arr[word_of(pf_pc)] <= ext_inst;
    if (en && fstate == F_MISS && if_done)
      tag_arr[idx_of(miss_pc)] <= tag_of(miss_pc, kernel);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate    <= F_IDLE;
      pstate    <= P_IDLE;
      valid     <= '0;
      miss_pc   <= '0;
      pf_pc     <= '0;
      buf_valid <= 1'b0;
      buf_inst  <= '0;
      buf_pc    <= '0;
      buf_k     <= 1'b0;
    end else begin
      if (!en) valid <= '0;
      unique case (fstate)
        F_IDLE: begin
          if (buf_hit && inst_valid) buf_valid <= 1'b0;
          if (demand_miss) begin
            fstate  <= F_MISS;
            miss_pc <= fetch_pc;
            pstate  <= P_IDLE;               // a demand miss ends prefetching
          end
        end
        F_MISS: begin
          if (if_done) begin
            fstate <= F_IDLE;
            if (en) begin
              if (tag_arr[idx_of(miss_pc)] != tag_of(miss_pc, kernel))
                valid[idx_of(miss_pc)*BWORDS +: BWORDS] <= '0;
              valid[word_of(miss_pc)] <= 1'b1;
              if (pf_en && miss_pc[OFFW-1:0] != OFFW'(BWORDS-1)) begin
                pstate <= P_ACTIVE;
                pf_pc  <= miss_pc + 30'd1;
              end
            end else begin
              buf_valid <= 1'b1;
              buf_inst  <= ext_inst;
              buf_pc    <= miss_pc;
              buf_k     <= kernel;
            end
          end
        end
        default: fstate <= F_IDLE;
      endcase
      if (pstate == P_ACTIVE && !(fstate == F_IDLE && demand_miss) && !(fstate == F_MISS && if_done)) begin
        if (!en || !pf_en || pf_stop) begin
          pstate <= P_IDLE;
        end else if (!pf_req || pf_done) begin
          if (pf_done) valid[word_of(pf_pc)] <= 1'b1;
          if (pf_pc[OFFW-1:0] == OFFW'(BWORDS-1)) pstate <= P_IDLE;
          else pf_pc <= pf_pc + 30'd1;
        end
      end
    end
  end
endmodule
