// Unit test of the single-port extrinsic banks with temporary buffer.
// A shadow model keeps the architectural contents. Phases:
//   1. writes with no reads go straight to the banks;
//   2. reads every cycle with writes on random banks in the same cycles
//      (writes must be parked, reads must return the old contents one
//      cycle later, buf_wr must pulse);
//   3. idle cycles drain the buffer row by row (drain pulses, buf_empty at
//      the end) and the parked values become visible;
//   4. more parked rows than the buffer depth raise ovf.
module tb_ext_mem_sp;
  localparam int P = 4, W = 12, DW = 5, TD = 6, AW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en = 0;
  logic [AW-1:0] rd_addr [P], wr_addr [P];
  logic [DW-1:0] rd_data [P], wr_data [P];
  logic wr_en [P];
  logic buf_empty, ovf, buf_wr, drain;
  ext_mem_sp #(.P(P), .W(W), .DW(DW), .TD(TD)) dut (.*);

  int checks = 0, failures = 0, n_drain = 0, n_bufwr = 0;
  int mem [P][W];

  always @(posedge clk) begin
    if (rst_n && drain) n_drain++;
    if (rst_n && buf_wr) n_bufwr++;
  end

  task automatic idle_writes_off();
    for (int b = 0; b < P; b++) wr_en[b] = 0;
  endtask

  task automatic read_all_check(string tag);
    for (int a = 0; a < W; a++) begin
      @(negedge clk); rd_en = 1; idle_writes_off();
      for (int b = 0; b < P; b++) rd_addr[b] = AW'(a);
      @(negedge clk); rd_en = 0;
      for (int b = 0; b < P; b++) begin
        checks++;
        if (int'(rd_data[b]) != mem[b][a]) begin
          failures++;
          if (failures < 6) $display("%s: bank %0d addr %0d got %0d expected %0d", tag, b, a, rd_data[b], mem[b][a]);
        end
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int b = 0; b < P; b++) begin wr_en[b] = 0; rd_addr[b] = '0; wr_addr[b] = '0; wr_data[b] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    // 1. direct writes
    for (int a = 0; a < W; a++) begin
      @(negedge clk);
      for (int b = 0; b < P; b++) begin
        wr_en[b] = 1; wr_addr[b] = AW'(a); mem[b][a] = int'($urandom_range(31)); wr_data[b] = DW'(mem[b][a]);
      end
    end
    @(negedge clk); idle_writes_off();
    checks++; if (!buf_empty || n_bufwr != 0) failures++;
    read_all_check("direct");
    // 2. overlapped reads and writes: TD-1 rows parked. Each bank writes a
    // different address in every row, as in the decoder, so the drain order
    // does not matter.
    begin
      int pend [$][3];
      for (int r = 0; r < TD - 1; r++) begin
        @(negedge clk);
        rd_en = 1;
        for (int b = 0; b < P; b++) begin
          rd_addr[b] = AW'(r);
          wr_en[b]   = ($urandom_range(2) != 0);
          wr_addr[b] = AW'((r + 3 * b) % W);
          wr_data[b] = DW'($urandom_range(31));
          if (wr_en[b]) pend.push_back('{b, int'(wr_addr[b]), int'(wr_data[b])});
        end
        wr_en[0] = 1; wr_data[0] = DW'(mem[0][r] ^ 1);  // at least one write per row
        pend.push_back('{0, int'(wr_addr[0]), int'(wr_data[0])});
        #1;
        checks++; if (!buf_wr) failures++;
        @(negedge clk);
        // read data reflects the contents before the parked writes
        for (int b = 0; b < P; b++) begin
          checks++; if (int'(rd_data[b]) != mem[b][r]) failures++;
        end
        // keep the banks busy with reads so that nothing drains yet
        idle_writes_off();
        rd_en = 1;
      end
      @(negedge clk);
      rd_en = 0;
      checks++; if (buf_empty || n_drain != 0) failures++;
      for (int i = 0; i < pend.size(); i++) mem[pend[i][0]][pend[i][1]] = pend[i][2];
      // 3. drain
      repeat (TD + 2) @(negedge clk);
      checks++; if (!buf_empty) failures++;
      checks++; if (n_drain != TD - 1) begin failures++; $display("drains %0d", n_drain); end
      checks++; if (ovf) failures++;
      read_all_check("after drain");
    end
    // 4. overflow
    for (int r = 0; r < TD + 1; r++) begin
      @(negedge clk);
      rd_en = 1; wr_en[1] = 1; wr_addr[1] = AW'(r); wr_data[1] = '0;
    end
    @(negedge clk); rd_en = 0; idle_writes_off();
    checks++; if (!ovf) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
