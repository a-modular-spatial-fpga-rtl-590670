// tb_neighbour_mux: every PE position of a 3 x 5 grid; for each phase
// checks the partner direction against the pairing rule (horizontal pairs
// starting at even, then odd, columns; the same for rows), that the
// partner's partner is the PE itself, and that the selected link is the
// neighbour's.
module tb_neighbour_mux;
  import sp_pkg::*;
  localparam int R = 3, C = 5, N = R * C;
  logic [1:0] phase;
  link_t lk [4];   // N, E, W, S
  dir_e dir [N];
  logic hp [N];
  link_t partner [N];
  int checks = 0, failures = 0;

  for (genvar y = 0; y < R; y++) begin : g_y
    for (genvar x = 0; x < C; x++) begin : g_x
      neighbour_mux #(.X(x), .Y(y), .ROWS(R), .COLS(C)) dut (
        .phase, .link_n(lk[0]), .link_e(lk[1]), .link_w(lk[2]), .link_s(lk[3]),
        .dir(dir[y*C+x]), .has_partner(hp[y*C+x]), .partner(partner[y*C+x])
      );
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pidx(int i, int ph);
    int x, y;
    x = i % C; y = i / C;
    case (ph)
      0: return (x % 2 == 0) ? ((x + 1 < C) ? i + 1 : -1) : i - 1;
      1: return (x % 2 == 1) ? ((x + 1 < C) ? i + 1 : -1) : ((x > 0) ? i - 1 : -1);
      2: return (y % 2 == 0) ? ((y + 1 < R) ? i + C : -1) : i - C;
      default: return (y % 2 == 1) ? ((y + 1 < R) ? i + C : -1) : ((y > 0) ? i - C : -1);
    endcase
  endfunction

  initial begin
    int p, d;
    for (int k = 0; k < 4; k++) begin
      lk[k] = '0;
      lk[k].le_id = id_t'(1000 + k);
      lk[k].delta = delta_t'(k - 2);
    end
    for (int ph = 0; ph < 4; ph++) begin
      phase = 2'(ph);
      #1;
      for (int i = 0; i < N; i++) begin
        p = pidx(i, ph);
        checks++;
        if (p < 0) begin
          if (hp[i] || dir[i] != DIR_NONE || partner[i] != '0) begin failures++; $display("FAIL %0d ph %0d expected none", i, ph); end
        end else begin
          d = (p == i - C) ? 0 : (p == i + 1) ? 1 : (p == i - 1) ? 2 : 3;
          if (!hp[i] || partner[i] != lk[d]) begin failures++; $display("FAIL %0d ph %0d partner", i, ph); end
          checks++;
          if (pidx(p, ph) != i) begin failures++; $display("FAIL pairing not mutual"); end
          checks++;
          if (dir[i] != ((d == 0) ? DIR_N : (d == 1) ? DIR_E : (d == 2) ? DIR_W : DIR_S)) begin
            failures++; $display("FAIL %0d ph %0d dir", i, ph);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
