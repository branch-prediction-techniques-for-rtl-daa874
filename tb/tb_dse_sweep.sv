// tb_dse_sweep: runs the front end over the configurations of the source
// design's exploration, each on the same generated program:
//   - the buffer-depth study: BHT, GAs, BTB1 and BTB2 with 256 entries, at
//     buffer depths 1, 2, 4 and 8 long instructions;
//   - BHT and GAs history tables of 16 to 1024 entries (buffer depth 4);
//   - BTB2 geometries: 16 entries direct mapped with no tag (4 address
//     bits), 16 entries fully associative, 64 entries direct mapped with 8
//     address bits, 1024 entries 4-way.
// Each run is checked bundle by bundle by its environment and must see
// predictor accesses, taken predictions and filtered cycles. The table
// printed at the end gives, per configuration, the cycles to execute the
// same number of bundles (a delay figure), the predictor accesses per
// 100 cycles (how often the predictor is switched on), and the redirects.
module tb_dse_sweep;
  import lx_fe_pkg::*;

  localparam int NA = 16, NB = 14, NC = 4, N = NA + NB + NC;
  localparam int TARGET = 4000;

  typedef struct packed {
    pred_kind_e  kind;
    int unsigned entries, hist, ways, abits, depth;
  } cfg_t;

  function automatic cfg_t cfg(int i);
    cfg_t c;
    pred_kind_e k [4] = '{PK_BHT, PK_GAS, PK_BTB1, PK_BTB2};
    int d [4] = '{1, 2, 4, 8};
    c = '{kind: PK_GAS, entries: 256, hist: 4, ways: 4, abits: 28, depth: 4};
    if (i < NA) begin
      c.kind  = k[i / 4];
      c.depth = d[i % 4];
    end else if (i < NA + NB) begin
      c.kind    = ((i - NA) % 2) ? PK_GAS : PK_BHT;
      c.entries = 16 << ((i - NA) / 2);
      c.hist    = (c.entries == 16) ? 3 : 4;
    end else begin
      c.kind = PK_BTB2;
      case (i - NA - NB)
        0: begin c.entries = 16;   c.ways = 1;  c.abits = 4;  end
        1: begin c.entries = 16;   c.ways = 16; c.abits = 28; end
        2: begin c.entries = 64;   c.ways = 1;  c.abits = 8;  end
        default: begin c.entries = 1024; c.ways = 4; c.abits = 28; end
      endcase
    end
    return c;
  endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [N];
  int   cycles [N], acc [N], det [N], inh [N], tk [N], red [N], chk [N], fail [N];

  for (genvar i = 0; i < N; i++) begin : g_cfg
    localparam cfg_t C = cfg(i);
    fe_run #(.KIND(C.kind), .ENTRIES(C.entries), .HIST_W(C.hist), .WAYS(C.ways),
             .ADDR_BITS(C.abits), .DEPTH(C.depth), .SEED(5), .TARGET(TARGET)) run (
      .clk, .rst_n, .done(done[i]), .cycles(cycles[i]), .accesses(acc[i]), .detects(det[i]),
      .inhibits(inh[i]), .taken_preds(tk[i]), .redirects(red[i]), .checks(chk[i]), .failures(fail[i]));
  end

  int checks = 0, failures = 0;

  function automatic logic all_done();
    for (int i = 0; i < N; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (TARGET * 20) @(posedge clk);
    failures++;
    for (int i = 0; i < N; i++) if (!done[i]) $display("FAIL config %0d did not finish", i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string kn [4] = '{"BHT", "GAs", "BTB1", "BTB2"};
    cfg_t c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    @(negedge clk);
    $display("config                          cycles  access/100cyc  inhibited  taken_pred  redirects");
    for (int i = 0; i < N; i++) begin
      c = cfg(i);
      $display("%-4s entries %4d ways %2d abits %2d depth %0d  %6d  %6.1f  %6d  %6d  %6d",
               kn[c.kind], c.entries, c.ways, c.abits, c.depth, cycles[i],
               100.0 * acc[i] / cycles[i], inh[i], tk[i], red[i]);
      checks += chk[i] + 3;
      failures += fail[i];
      if (acc[i] == 0 || tk[i] == 0) begin
        failures++; $display("FAIL config %0d: no predictor access or no taken prediction", i);
      end
      if (acc[i] >= cycles[i]) begin
        failures++; $display("FAIL config %0d: predictor on in every cycle", i);
      end
      if (acc[i] + inh[i] != det[i]) begin
        failures++; $display("FAIL config %0d: accesses %0d + inhibited %0d != detections %0d", i, acc[i], inh[i], det[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
