// Unit test of the two-page input buffer. Both pages are filled with
// random values through the ys and parity ports (with the two ports working
// on different pages in the same cycle), then every address of every bank is
// read back from both pages and compared with a shadow copy, checking the
// one-cycle read latency and that reads without rd_en hold the outputs.
module tb_in_buf;
  import turbo_pkg::*;
  localparam int P = 4, W = 10, BW = 2, AW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ld_ys_en = 0, ld_ys_page = 0, ld_par_en = 0, ld_par_page = 0, rd_page = 0, rd_en = 0;
  logic [BW-1:0] ld_ys_bank = '0, ld_par_bank = '0;
  logic [AW-1:0] ld_ys_addr = '0, ld_par_addr = '0;
  y_t ld_ys = '0; y_t ld_pa [3]; y_t ld_pb [3];
  logic [AW-1:0] ys_rd_addr [P], par_rd_addr [P];
  y_t ys_rd [P]; y_t pa_rd [P][3]; y_t pb_rd [P][3];
  in_buf #(.P(P), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int sys [2][P][W], par [2][P][W][6];

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin ld_pa[i] = '0; ld_pb[i] = '0; end
    for (int b = 0; b < P; b++) begin ys_rd_addr[b] = '0; par_rd_addr[b] = '0; end
    // fill: ys of page g together with parity of page !g
    for (int g = 0; g < 2; g++)
      for (int b = 0; b < P; b++)
        for (int a = 0; a < W; a++) begin
          @(negedge clk);
          ld_ys_en = 1; ld_ys_page = 1'(g); ld_ys_bank = BW'(b); ld_ys_addr = AW'(a);
          sys[g][b][a] = int'($urandom_range(30)) - 15; ld_ys = y_t'(sys[g][b][a]);
          ld_par_en = 1; ld_par_page = 1'(!g); ld_par_bank = BW'(b); ld_par_addr = AW'(a);
          for (int i = 0; i < 6; i++) par[!g][b][a][i] = int'($urandom_range(30)) - 15;
          for (int i = 0; i < 3; i++) begin ld_pa[i] = y_t'(par[!g][b][a][i]); ld_pb[i] = y_t'(par[!g][b][a][3+i]); end
        end
    @(negedge clk); ld_ys_en = 0; ld_par_en = 0;
    // read back: decoder b reads ys address a and parity address W-1-a
    for (int g = 0; g < 2; g++)
      for (int a = 0; a < W; a++) begin
        @(negedge clk);
        rd_en = 1; rd_page = 1'(g);
        for (int b = 0; b < P; b++) begin ys_rd_addr[b] = AW'(a); par_rd_addr[b] = AW'(W - 1 - a); end
        @(negedge clk);
        rd_en = 0;
        for (int b = 0; b < P; b++) ys_rd_addr[b] = AW'((a + 1) % W);
        for (int rep = 0; rep < 2; rep++) begin
          for (int b = 0; b < P; b++) begin
            checks++;
            if (int'(ys_rd[b]) != sys[g][b][a]) failures++;
            for (int i = 0; i < 3; i++) begin
              checks += 2;
              if (int'(pa_rd[b][i]) != par[g][b][W-1-a][i]) failures++;
              if (int'(pb_rd[b][i]) != par[g][b][W-1-a][3+i]) failures++;
            end
          end
          @(negedge clk);  // outputs hold while rd_en is low
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
