// tb_cra_switching_core: checks the switching core at its default size
// (W = 72, d = 3, 16 LB inputs, 4 LB outputs).
//
// Directed cases, each with the signal driven 0 and 1:
//   * direct turn: west track 2 -> south track 2 (one MUX),
//   * extended path: west track 2 -> north MUX 2 -> west MUX 1 -> south
//     MUX 0 -> out on south track 0, a track pair with no direct
//     switching point (three MUXes),
//   * logic-block output 1 -> east MUX 5 -> out on east track 5,
//   * incoming east track 9 -> logic-block input 5 tap 0,
//   * a high-Z MUX and a closed pass switch leave the outside undriven.
// Random case: pass switches and N/S MUXes random, E/W MUXes only high-Z
// or LB output (so no MUX ring can close); every output is compared with a
// reference written here from the wiring table: MUX on side s, track t,
// input k reads side A/B of s at track t, t, t+1 (A/B: N:W/E, S:E/W,
// E:N/S, W:S/N).
module tb_cra_switching_core;
  import cra_pkg::*;
  localparam int W = 72, D = 3, NI = 16, NO = 4, SW = 3, TPS = 4;
  localparam int N = 0, E = 1, S = 2, WS = 3;

  logic   [3:0][W-1:0]        ext_in;
  logic   [NO-1:0]            lb_out;
  logic   [4*W*SW-1:0]        cfg_sel;
  logic   [4*W-1:0]           cfg_pass;
  drive_t [3:0][W-1:0]        ext_drv;
  logic   [3:0][W-1:0]        line;
  logic   [NI-1:0][4*TPS-1:0] lb_in_cand;
  int checks = 0, failures = 0;

  cra_switching_core dut (.ext_in(ext_in), .lb_out(lb_out), .cfg_sel(cfg_sel),
                          .cfg_pass(cfg_pass), .ext_drv(ext_drv), .line(line),
                          .lb_in_cand(lb_in_cand));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_cfg();
    cfg_sel = '0; cfg_pass = '0; ext_in = '0; lb_out = '0;
  endtask
  task automatic set_sel(input int s, input int t, input int code);
    cfg_sel[(s*W + t)*SW +: SW] = SW'(code);
  endtask
  task automatic set_pass(input int s, input int t);
    cfg_pass[s*W + t] = 1'b1;
  endtask
  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Reference model pieces.
  function automatic int side_a(input int s);
    case (s) 0: return 3; 1: return 0; 2: return 1; default: return 2; endcase
  endfunction
  function automatic int side_b(input int s);
    case (s) 0: return 1; 1: return 2; 2: return 3; default: return 0; endcase
  endfunction

  initial begin
    // Direct turn, west 2 -> south 2: south MUX input 1 reads side B of S = W.
    for (int v = 0; v < 2; v++) begin
      clear_cfg();
      set_pass(WS, 2); set_sel(S, 2, 2); set_pass(S, 2);
      ext_in[WS][2] = 1'(v);
      #1;
      check("direct turn en", ext_drv[S][2].en, 1'b1);
      check("direct turn val", ext_drv[S][2].val, 1'(v));
      check("entry pass not driving back", ext_drv[WS][2].en, 1'b0);
    end
    // Extended path west 2 -> south 0.
    for (int v = 0; v < 2; v++) begin
      clear_cfg();
      set_pass(WS, 2);
      set_sel(N, 2, 1);      // N MUX 2 input 0: W track 2
      set_sel(WS, 1, 3);     // W MUX 1 input 2: N track 2
      set_sel(S, 0, 3);      // S MUX 0 input 2: W track 1
      set_pass(S, 0);
      ext_in[WS][2] = 1'(v);
      #1;
      check("extended line N2", line[N][2], 1'(v));
      check("extended line W1", line[WS][1], 1'(v));
      check("extended out en", ext_drv[S][0].en, 1'b1);
      check("extended out val", ext_drv[S][0].val, 1'(v));
      check("intermediate N2 stays inside", ext_drv[N][2].en, 1'b0);
      check("intermediate W1 stays inside", ext_drv[WS][1].en, 1'b0);
    end
    // No direct switching point from west 2 to south 0: none of the south
    // MUX 0 inputs reads west track 2.
    begin
      clear_cfg();
      set_pass(WS, 2); set_pass(S, 0);
      ext_in[WS][2] = 1'b1;
      for (int c = 1; c <= 3; c++) begin
        set_sel(S, 0, c);
        #1;
        check("no direct W2->S0", ext_drv[S][0].val, 1'b0);
      end
    end
    // Logic-block output 1 onto east track 5.
    for (int v = 0; v < 2; v++) begin
      clear_cfg();
      set_sel(E, 5, 4); set_pass(E, 5);
      lb_out = 4'b0000; lb_out[1] = 1'(v);
      #1;
      check("lb out en", ext_drv[E][5].en, 1'b1);
      check("lb out val", ext_drv[E][5].val, 1'(v));
    end
    // Incoming east track 9 -> LB input 5 (pin 9), tap 0 of side E.
    for (int v = 0; v < 2; v++) begin
      clear_cfg();
      set_pass(E, 9);
      ext_in[E][9] = 1'(v);
      #1;
      check("lb in tap", lb_in_cand[5][E*TPS + 0], 1'(v));
    end
    // Tap 3 of input 5 is track 69; input 10 has no tap 3 (track 74).
    begin
      clear_cfg();
      set_pass(N, 69); ext_in[N][69] = 1'b1;
      #1;
      check("lb in tap 3", lb_in_cand[5][N*TPS + 3], 1'b1);
      check("lb in absent tap", lb_in_cand[10][N*TPS + 3], 1'b0);
    end
    // High-Z MUX and open pass switch.
    begin
      clear_cfg();
      set_pass(S, 2); ext_in[WS][2] = 1'b1; set_pass(WS, 2);
      #1;
      check("high-Z mux does not drive", ext_drv[S][2].en, 1'b0);
      set_sel(S, 2, 2); cfg_pass[S*W + 2] = 1'b0;
      #1;
      check("open pass switch does not drive", ext_drv[S][2].en, 1'b0);
      check("line still carries turn", line[S][2], 1'b1);
    end
    // Random, loop-free configurations against the reference.
    for (int it = 0; it < 300; it++) begin
      logic rl [4][W];
      logic rm_en [4][W];
      logic rm_v [4][W];
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < W; t++) begin
          int code;
          ext_in[s][t] = 1'($urandom);
          cfg_pass[s*W + t] = 1'($urandom);
          if (s == N || s == S) code = $urandom_range(0, 7);
          else begin
            code = $urandom_range(0, 3);
            code = (code == 0) ? 0 : (code == 1) ? 4 : 4 + code;
          end
          set_sel(s, t, code);
        end
      lb_out = 4'($urandom);
      #1;
      // E/W lines first (they do not read other lines), then N/S.
      for (int pass = 0; pass < 2; pass++) begin
        for (int s = 0; s < 4; s++) begin
          if ((pass == 0) != (s == E || s == WS)) continue;
          for (int t = 0; t < W; t++) begin
            int code;
            code = int'(cfg_sel[(s*W + t)*SW +: SW]);
            rm_en[s][t] = 0; rm_v[s][t] = 0;
            if (code == 4) begin rm_en[s][t] = 1; rm_v[s][t] = lb_out[t % 4]; end
            else if (code >= 1 && code <= 3) begin
              int ss, tt;
              rm_en[s][t] = 1;
              ss = (code == 1) ? side_a(s) : side_b(s);
              tt = (code == 3) ? t + 1 : t;
              rm_v[s][t] = (tt < W) ? rl[ss][tt] : 1'b0;
            end
            rl[s][t] = rm_en[s][t] ? rm_v[s][t] : (cfg_pass[s*W + t] & ext_in[s][t]);
          end
        end
      end
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < W; t++) begin
          checks++;
          if (line[s][t] !== rl[s][t] || ext_drv[s][t].en !== (rm_en[s][t] & cfg_pass[s*W + t])
              || (ext_drv[s][t].en && ext_drv[s][t].val !== rm_v[s][t])) begin
            failures++;
            if (failures < 10) $display("FAIL random it %0d side %0d track %0d", it, s, t);
          end
        end
      for (int j = 0; j < NI; j++)
        for (int s = 0; s < 4; s++)
          for (int m = 0; m < TPS; m++) begin
            int tr;
            tr = m*20 + 4 + j;
            checks++;
            if (lb_in_cand[j][s*TPS + m] !== ((tr < W) ? rl[s][tr] : 1'b0)) begin
              failures++;
              if (failures < 10) $display("FAIL random tap it %0d j %0d s %0d m %0d", it, j, s, m);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
