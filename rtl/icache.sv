// icache: two-cycle, set-associative instruction cache for the seven-stage pipeline.
//
// Sits between the fetch stages and main memory. Geometry follows the
// generics: CACHE_KB kilobytes, WAYS ways (1, 2 or 4), WORDS words of DATA_W
// bits per line, ADDR_W-bit byte addresses. Defaults 2 kB, 4 ways, 4 words,
// 32 bits give 32 sets: tag 23 bits, index 5, word offset 2, byte offset 2.
//
// Cycle 1 (IF1): the PC's index addresses every way's directory block
// ({valid, tag}) and, together with the word offset, every way's data block,
// which is one instruction wide and holds sets x WORDS words, so a refill can
// write each word as it arrives and no word-select multiplexer is needed. Each
// way compares {1'b1, PC tag} with its directory entry, which checks tag and
// valid bit in one comparator. Per-way hit bits and per-way words are
// registered. Cycle 2 (IF2): the hit bits are ORed into the overall hit and
// select the word (`instr`).
//
// A registered miss raises `stall`, which must freeze the fetch stages, and
// starts the controller's line refill from main memory through the mem_if
// registers into the way the pseudo-LRU table names (chosen when the miss is
// seen). When the missed word itself arrives it is also placed straight into
// the IF2 register with that way's hit bit set, so once the refill ends the
// waiting instruction is already there and fetch resumes with the next PC.
// The directory entry is written with the last word of the line. A hit that
// the pipeline consumes (`req` high in a hit cycle) marks its way most
// recently used.
//
// Pipeline side: `req` means IF1 advances this cycle with PC `addr`; the
// answer appears on `instr` in the next cycle and is valid whenever `stall`
// is low. `stall` is high during the flush after reset, during a refill, and
// in a cycle where the registered request missed. Main-memory side: `mm_req`
// with word address `mm_addr` (held off by `mm_busy`); words come back in
// request order on `mm_rdata` with `mm_rvalid`.
//
// Follows the described cache (datapath, memory organisation, comparator,
// registers between the two stages, early hand-over of the missed word,
// flush, pseudo-LRU, memory interface). The cycle where stall drops one cycle
// after the last word arrives, and the point of the directory write, are this
// design's choices.
module icache
  import icache_pkg::*;
#(
  parameter int unsigned CACHE_KB = 2,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned WORDS    = 4,
  parameter int unsigned DATA_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // pipeline side
  input  logic              req,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] instr,
  output logic              stall,
  // main memory side
  output logic              mm_req,
  output logic [ADDR_W-1:0] mm_addr,
  input  logic              mm_busy,
  input  logic [DATA_W-1:0] mm_rdata,
  input  logic              mm_rvalid
);

  localparam int unsigned OFFB_W = $clog2(DATA_W / 8);
  localparam int unsigned OFFI_W = $clog2(WORDS);
  localparam int unsigned IDX_W  = $clog2((1024 * CACHE_KB) / (WAYS * (DATA_W / 8) * WORDS));
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - OFFI_W - OFFB_W;
  localparam int unsigned SETS   = 1 << IDX_W;

  // ---------------------------------------------------------------- memory blocks
  logic [TAG_W:0]    dir_q  [WAYS][SETS];          // {valid, tag}
  logic [DATA_W-1:0] data_q [WAYS][SETS * WORDS];

  // ---------------------------------------------------------------- IF1 lookup
  logic [IDX_W-1:0]  l_idx;
  logic [OFFI_W-1:0] l_off;
  logic [TAG_W-1:0]  l_tag;
  logic [WAYS-1:0]   way_hit_d;
  logic [DATA_W-1:0] way_data_d [WAYS];

  assign l_idx = addr[OFFB_W + OFFI_W +: IDX_W];
  assign l_off = addr[OFFB_W +: OFFI_W];
  assign l_tag = addr[ADDR_W-1 -: TAG_W];

  always_comb begin
    for (int w = 0; w < int'(WAYS); w++) begin
      way_hit_d[w]  = (dir_q[w][l_idx] == {1'b1, l_tag});
      way_data_d[w] = data_q[w][{l_idx, l_off}];
    end
  end

  // ---------------------------------------------------------------- IF1/IF2 registers
  logic              rq_valid_q;
  logic [ADDR_W-1:0] rq_addr_q;
  logic [WAYS-1:0]   way_hit_q;
  logic [DATA_W-1:0] way_word_q [WAYS];

  logic [IDX_W-1:0]  r_idx;
  logic [OFFI_W-1:0] r_off;
  logic [TAG_W-1:0]  r_tag;
  logic              hit, miss;

  assign r_idx = rq_addr_q[OFFB_W + OFFI_W +: IDX_W];
  assign r_off = rq_addr_q[OFFB_W +: OFFI_W];
  assign r_tag = rq_addr_q[ADDR_W-1 -: TAG_W];

  // ---------------------------------------------------------------- controller
  ic_state_e         state;
  logic [IDX_W-1:0]  flush_idx;
  logic              flush_we, fill_we, fill_last;
  logic [OFFI_W-1:0] mm_off, fill_off;
  logic [DATA_W-1:0] mif_data;
  logic              mif_valid;

  mem_if #(.DATA_W(DATA_W)) u_mif (
    .clk, .rst_n,
    .mm_rdata (mm_rdata),
    .mm_rvalid(mm_rvalid),
    .data_q   (mif_data),
    .valid_q  (mif_valid)
  );

  icache_ctrl #(.IDX_W(IDX_W), .OFF_W(OFFI_W)) u_ctrl (
    .clk, .rst_n,
    .miss     (miss),
    .mm_busy  (mm_busy),
    .mm_valid (mif_valid),
    .state    (state),
    .flush_idx(flush_idx),
    .flush_we (flush_we),
    .mm_req   (mm_req),
    .mm_off   (mm_off),
    .fill_we  (fill_we),
    .fill_off (fill_off),
    .fill_last(fill_last)
  );

  assign mm_addr = {rq_addr_q[ADDR_W-1 : OFFB_W + OFFI_W], mm_off, {OFFB_W{1'b0}}};

  // ---------------------------------------------------------------- replacement
  logic [WAYS-1:0] victim, victim_q;
  logic            touch;

  icache_plru #(.WAYS(WAYS), .SETS(SETS)) u_plru (
    .clk,
    .flush_we (flush_we),
    .flush_idx(flush_idx),
    .rd_idx   (r_idx),
    .victim   (victim),
    .touch_en (touch),
    .touch_idx(r_idx),
    .touch_way(way_hit_q)
  );

  // ---------------------------------------------------------------- IF2 output
  always_comb begin
    instr = '0;
    for (int w = 0; w < int'(WAYS); w++) if (way_hit_q[w]) instr = way_word_q[w];
  end

  assign hit   = |way_hit_q;
  assign miss  = (state == ST_TAGCMP) && rq_valid_q && !hit;
  assign stall = (state != ST_TAGCMP) || miss;
  assign touch = (state == ST_TAGCMP) && rq_valid_q && hit && req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_valid_q <= 1'b0;
      rq_addr_q  <= '0;
      way_hit_q  <= '0;
      victim_q   <= '0;
      for (int w = 0; w < int'(WAYS); w++) way_word_q[w] <= '0;
    end else if (state == ST_TAGCMP) begin
      if (miss) victim_q <= victim;
      if (req && !stall) begin
        rq_valid_q <= 1'b1;
        rq_addr_q  <= addr;
        way_hit_q  <= way_hit_d;
        for (int w = 0; w < int'(WAYS); w++) way_word_q[w] <= way_data_d[w];
      end
    end else if (state == ST_MEMREAD) begin
      // hand the missed word straight to IF2
      if (fill_we && (fill_off == r_off)) begin
        for (int w = 0; w < int'(WAYS); w++) begin
          if (victim_q[w]) begin
            way_word_q[w] <= mif_data;
            way_hit_q[w]  <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- memory input multiplexer
  always_ff @(posedge clk) begin
    for (int w = 0; w < int'(WAYS); w++) begin
      if (flush_we) begin
        dir_q[w][flush_idx] <= '0;
      end else if (fill_we && victim_q[w]) begin
        data_q[w][{r_idx, fill_off}] <= mif_data;
        if (fill_last) dir_q[w][r_idx] <= {1'b1, r_tag};
      end
    end
  end

endmodule
