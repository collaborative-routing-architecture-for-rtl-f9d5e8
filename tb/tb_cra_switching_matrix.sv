// tb_cra_switching_matrix: switching capability of a 3 x 3 switching core
// (W = 3, d = 3), found by searching configurations, not from the wiring
// table.
//
// For every horizontal track r and vertical track c the test asks whether
// a signal entering on one of them can leave on the other:
//   direct   one MUX between them,
//   extended a chain of three MUXes (pass switches of the intermediate
//            lines off).
// First the wiring is discovered by enabling one MUX at a time and driving
// each line in turn; then every path found is configured and simulated
// with the signal at 0 and 1. Chains never close a ring of MUXes.
// Sources are the west side (horizontal) and the south side (vertical);
// exits are the two perpendicular sides. Expected, as published for this
// core: 7 direct switching points forming the band |r - c| <= 1, and all
// 9 track pairs once extended paths are allowed.
module tb_cra_switching_matrix;
  import cra_pkg::*;
  localparam int W = 3, SW = 3, TPS = 1;
  localparam int N = 0, E = 1, S = 2, WS = 3;

  logic   [3:0][W-1:0]        ext_in;
  logic   [3:0]               lb_out;
  logic   [4*W*SW-1:0]        cfg_sel;
  logic   [4*W-1:0]           cfg_pass;
  drive_t [3:0][W-1:0]        ext_drv;
  logic   [3:0][W-1:0]        line;
  logic   [15:0][4*TPS-1:0]   lb_in_cand;
  int checks = 0, failures = 0;
  bit direct [W][W];     // [r][c]
  bit reach  [W][W];

  cra_switching_core #(.W(W)) dut (.ext_in(ext_in), .lb_out(lb_out), .cfg_sel(cfg_sel),
                                   .cfg_pass(cfg_pass), .ext_drv(ext_drv), .line(line),
                                   .lb_in_cand(lb_in_cand));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Does the exit follow the source for both values?
  task automatic probe(input int ss, input int st, input int ds, input int dt, output bit ok);
    ok = 1;
    for (int v = 0; v < 2; v++) begin
      ext_in = '0;
      ext_in[ss][st] = 1'(v);
      #1;
      if (!(ext_drv[ds][dt].en && ext_drv[ds][dt].val == 1'(v))) ok = 0;
    end
  endtask

  function automatic bit is_vertical(input int s);
    return (s == N || s == S);
  endfunction

  // Line (s*W + t) that MUX m reads with select code k, found by probing.
  int src_of [4*W][4];

  initial begin
    lb_out = '0;
    for (int r = 0; r < W; r++)
      for (int c = 0; c < W; c++) begin direct[r][c] = 0; reach[r][c] = 0; end

    // Discover the wiring: one MUX enabled at a time, every line driven in
    // turn from outside through its pass switch.
    for (int m = 0; m < 4*W; m++)
      for (int k = 1; k <= 3; k++) begin
        src_of[m][k] = -1;
        for (int l = 0; l < 4*W; l++) begin
          bit follows;
          if (l == m) continue;
          cfg_sel = '0; cfg_pass = '0;
          cfg_sel[m*SW +: SW] = SW'(k);
          cfg_pass[l] = 1'b1;
          follows = 1;
          for (int v = 0; v < 2; v++) begin
            ext_in = '0;
            ext_in[l / W][l % W] = 1'(v);
            #1;
            if (line[m / W][m % W] !== 1'(v)) follows = 0;
          end
          if (follows) src_of[m][k] = l;
        end
      end

    for (int src = 0; src < 2; src++) begin
      int ss;
      ss = (src == 0) ? WS : S;
      for (int st = 0; st < W; st++)
        for (int ds = 0; ds < 4; ds++) begin
          if (is_vertical(ds) == is_vertical(ss)) continue;
          for (int dt = 0; dt < W; dt++) begin
            int r, c, sl, dl;
            bit ok, found;
            r = is_vertical(ss) ? dt : st;
            c = is_vertical(ss) ? st : dt;
            sl = ss*W + st;
            dl = ds*W + dt;
            found = 0;
            // Direct: the exit MUX reads the source line.
            for (int k = 1; k <= 3 && !found; k++) begin
              if (src_of[dl][k] != sl) continue;
              cfg_sel = '0; cfg_pass = '0;
              cfg_pass[sl] = 1'b1; cfg_pass[dl] = 1'b1;
              cfg_sel[dl*SW +: SW] = SW'(k);
              probe(ss, st, ds, dt, ok);
              checks++;
              if (!ok) begin failures++; $display("FAIL direct path did not carry"); end
              else found = 1;
            end
            if (found) begin direct[r][c] = 1; reach[r][c] = 1; end
            // Extended: source -> m1 -> m2 -> exit, a chain with no ring.
            for (int m1 = 0; m1 < 4*W && !found; m1++)
              for (int k1 = 1; k1 <= 3 && !found; k1++) begin
                if (src_of[m1][k1] != sl || m1 == dl) continue;
                for (int m2 = 0; m2 < 4*W && !found; m2++)
                  for (int k2 = 1; k2 <= 3 && !found; k2++) begin
                    if (src_of[m2][k2] != m1 || m2 == dl || m2 == sl) continue;
                    for (int k3 = 1; k3 <= 3 && !found; k3++) begin
                      if (src_of[dl][k3] != m2) continue;
                      cfg_sel = '0; cfg_pass = '0;
                      cfg_pass[sl] = 1'b1; cfg_pass[dl] = 1'b1;
                      cfg_sel[m1*SW +: SW] = SW'(k1);
                      cfg_sel[m2*SW +: SW] = SW'(k2);
                      cfg_sel[dl*SW +: SW] = SW'(k3);
                      probe(ss, st, ds, dt, ok);
                      checks++;
                      if (!ok) begin failures++; $display("FAIL extended path did not carry"); end
                      else found = 1;
                    end
                  end
              end
            if (found) reach[r][c] = 1;
          end
        end
    end

    for (int r = 0; r < W; r++) begin
      $display("row %0d  direct %0d%0d%0d  with extended %0d%0d%0d", r,
               direct[r][0], direct[r][1], direct[r][2], reach[r][0], reach[r][1], reach[r][2]);
      for (int c = 0; c < W; c++) begin
        checks++;
        if (direct[r][c] != ((r - c <= 1) && (c - r <= 1))) begin
          failures++;
          $display("FAIL direct point (%0d,%0d) = %0d", r, c, direct[r][c]);
        end
        checks++;
        if (!reach[r][c]) begin
          failures++;
          $display("FAIL pair (%0d,%0d) not reachable with extended paths", r, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
