// Unit test of the bank-mapping tables. Random bank numbers are loaded into
// the natural and the interleaved table; then every decoder reads a
// different random address each cycle from the table selected by rd_int,
// and the loader port reads the natural table. Results are checked one
// cycle later against shadow copies.
module tb_bank_map_lut;
  localparam int P = 4, W = 9, BW = 2, JW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ld_en = 0, ld_int = 0, rd_int = 0;
  logic [BW-1:0] ld_t = '0, ld_bank = '0, q_t = '0, q_bank;
  logic [JW-1:0] ld_j = '0, q_j = '0;
  logic [JW-1:0] rd_j [P];
  logic [BW-1:0] rd_bank [P];
  bank_map_lut #(.P(P), .W(W)) dut (.*);
  int checks = 0, failures = 0;
  int tab [2][P][W];

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int t = 0; t < P; t++) rd_j[t] = '0;
    for (int i = 0; i < 2; i++)
      for (int t = 0; t < P; t++)
        for (int j = 0; j < W; j++) begin
          @(negedge clk);
          tab[i][t][j] = int'($urandom_range(P - 1));
          ld_en = 1; ld_int = 1'(i); ld_t = BW'(t); ld_j = JW'(j); ld_bank = BW'(tab[i][t][j]);
        end
    @(negedge clk); ld_en = 0;
    for (int it = 0; it < 300; it++) begin
      int ej [P], qt, qj, sel;
      sel = int'($urandom_range(1));
      rd_int = 1'(sel);
      for (int t = 0; t < P; t++) begin ej[t] = int'($urandom_range(W - 1)); rd_j[t] = JW'(ej[t]); end
      qt = int'($urandom_range(P - 1)); qj = int'($urandom_range(W - 1));
      q_t = BW'(qt); q_j = JW'(qj);
      @(negedge clk);
      for (int t = 0; t < P; t++) begin
        checks++;
        if (int'(rd_bank[t]) != tab[sel][t][ej[t]]) failures++;
      end
      checks++;
      if (int'(q_bank) != tab[0][qt][qj]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
