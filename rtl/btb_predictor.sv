// btb_predictor: branch target buffer with per-entry direction state.
//
// A set-associative cache of ENTRIES entries in WAYS ways (WAYS = 1 is
// direct mapped, WAYS = ENTRIES fully associative). The branch address is
// cut to ADDR_BITS bits, PC[2 +: ADDR_BITS]: the low bits pick the set and
// the remaining ADDR_BITS - log2(sets) bits are the tag. Fewer address bits
// mean a shorter tag compare and more aliasing; with ADDR_BITS equal to the
// index width there is no tag at all and any valid entry of the set hits. Each entry holds a valid
// bit, the tag, the taken target and a CNT_W-bit direction state:
//   CNT_W = 1  last outcome of the branch (BTB1),
//   CNT_W = 2  2-bit saturating counter (BTB2).
// Lookup (req_valid) is combinational: taken when an entry hits and the
// state's upper bit is set; the target comes from the entry. Update
// (upd.valid, applied at the next edge): a hit trains the state and, when
// taken, rewrites the target; a taken branch that misses is allocated with
// a weakly-taken state into an invalid way, else the set's round-robin way.
// Not-taken branches that miss are not allocated.
// Size, associativity and address width as parameters, and the 1-bit /
// 2-bit management, follow the source design; allocation and way
// replacement are this design's choices.
module btb_predictor
  import lx_fe_pkg::*;
#(
  parameter int unsigned ENTRIES   = 256,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned ADDR_BITS = 28,
  parameter int unsigned CNT_W     = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  input  pc_t          req_pc,
  output logic         pred_taken,
  output pc_t          pred_target,
  output logic         hit,
  input  pred_update_t upd
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned IDXB  = (SETS > 1) ? $clog2(SETS) : 0;  // index bits used
  localparam int unsigned TAG_W = ADDR_BITS - IDXB;              // 0: no tag
  localparam int unsigned TAG_S = (TAG_W > 0) ? TAG_W : 1;        // storage width
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [SET_W-1:0] set_t;
  typedef logic [TAG_S-1:0] tag_t;
  typedef logic [WAY_W-1:0] way_t;

  typedef struct packed {
    logic             valid;
    tag_t             tag;
    logic [PC_W-3:0]  target;   // word address of the target
    logic [CNT_W-1:0] state;
  } entry_t;

  localparam logic [CNT_W-1:0] WEAK_TAKEN = {1'b1, {(CNT_W-1){1'b0}}};

  entry_t ent_q [SETS][WAYS];
  way_t   rr_q  [SETS];

  function automatic set_t set_of(pc_t pc);
    return (SETS > 1) ? set_t'(pc[2 +: SET_W]) : '0;
  endfunction
  function automatic tag_t tag_of(pc_t pc);
    return (TAG_W > 0) ? pc[2 + IDXB +: TAG_S] : '0;
  endfunction
  function automatic logic [CNT_W-1:0] step(logic [CNT_W-1:0] c, logic up);
    if (up)  return (c == '1) ? c : c + 1'b1;
    else     return (c == '0) ? c : c - 1'b1;
  endfunction

  // lookup
  set_t rs;
  way_t rway;
  always_comb begin
    rs   = set_of(req_pc);
    hit  = 1'b0;
    rway = '0;
    for (int w = 0; w < WAYS; w++)
      if (!hit && ent_q[rs][w].valid && ent_q[rs][w].tag == tag_of(req_pc)) begin
        hit  = 1'b1;
        rway = way_t'(w);
      end
    hit         = hit && req_valid;
    pred_taken  = hit && ent_q[rs][rway].state[CNT_W-1];
    pred_target = {ent_q[rs][rway].target, 2'b00};
  end

  // update
  set_t us;
  way_t uway, victim;
  logic uhit, has_free;
  always_comb begin
    us       = set_of(upd.pc);
    uhit     = 1'b0;
    uway     = '0;
    has_free = 1'b0;
    victim   = rr_q[us];
    for (int w = 0; w < WAYS; w++)
      if (!uhit && ent_q[us][w].valid && ent_q[us][w].tag == tag_of(upd.pc)) begin
        uhit = 1'b1;
        uway = way_t'(w);
      end
    for (int w = WAYS-1; w >= 0; w--)
      if (!ent_q[us][w].valid) begin
        has_free = 1'b1;
        victim   = way_t'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) ent_q[s][w] <= '0;
      end
    end else if (upd.valid) begin
      if (uhit) begin
        ent_q[us][uway].state <= step(ent_q[us][uway].state, upd.taken);
        if (upd.taken) ent_q[us][uway].target <= upd.target[PC_W-1:2];
      end else if (upd.taken) begin
        ent_q[us][victim] <= '{valid: 1'b1, tag: tag_of(upd.pc),
                               target: upd.target[PC_W-1:2], state: WEAK_TAKEN};
        if (!has_free)
          rr_q[us] <= (rr_q[us] == way_t'(WAYS-1)) ? '0 : way_t'(rr_q[us] + 1'b1);
      end
    end
  end

  initial assert (ADDR_BITS >= IDXB && ADDR_BITS <= PC_W - 2 && WAYS * SETS == ENTRIES)
    else $fatal(1, "btb_predictor: bad geometry");

endmodule
