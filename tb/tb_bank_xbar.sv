// Unit test of the decoder-to-bank crossbar. Each cycle a random
// permutation assigns banks to the decoders and a random subset of the
// decoders is active: the bank side must see exactly the active requests
// with their addresses and write data, and the read data of the attached
// bank model (registered, one cycle) must come back to the decoder that
// asked. Two requests to the same bank must raise conflict (the built-in
// assertion reports it as an error, so that case is the last one run).
module tb_bank_xbar;
  localparam int P = 8, AW = 5, DW = 4, RW = 9, BW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid [P], bank_en [P];
  logic [BW-1:0] req_bank [P];
  logic [AW-1:0] req_addr [P], bank_addr [P];
  logic [DW-1:0] req_wdata [P], bank_wdata [P];
  logic [RW-1:0] bank_rdata [P], rdata [P];
  logic conflict;
  bank_xbar #(.P(P), .AW(AW), .DW(DW), .RW(RW)) dut (.*);
  int checks = 0, failures = 0;

  // bank model: returns {bank, address} one cycle later
  always_ff @(posedge clk)
    for (int b = 0; b < P; b++) bank_rdata[b] <= {1'b0, BW'(b), bank_addr[b]};

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int perm [P], ea [P];
    bit ev [P];
    for (int t = 0; t < P; t++) begin req_valid[t] = 0; req_bank[t] = '0; req_addr[t] = '0; req_wdata[t] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      for (int t = 0; t < P; t++) perm[t] = t;
      perm.shuffle();
      for (int t = 0; t < P; t++) begin
        ev[t] = ($urandom_range(3) != 0); ea[t] = int'($urandom_range(2**AW - 1));
        req_valid[t] = ev[t]; req_bank[t] = BW'(perm[t]); req_addr[t] = AW'(ea[t]);
        req_wdata[t] = DW'(ea[t] ^ t);
      end
      #1;
      checks++; if (conflict) failures++;
      for (int t = 0; t < P; t++) begin
        int b; b = perm[t];
        checks++;
        if (bank_en[b] !== ev[t]) failures++;
        if (ev[t]) begin
          checks++;
          if (bank_addr[b] != AW'(ea[t]) || bank_wdata[b] != DW'(ea[t] ^ t)) failures++;
        end
      end
      @(negedge clk);
      // new bank numbers must not disturb the data of the previous cycle
      for (int t = 0; t < P; t++) begin req_valid[t] = 0; req_bank[t] = BW'(perm[(t + 1) % P]); end
      #1;
      for (int t = 0; t < P; t++)
        if (ev[t]) begin
          checks++;
          if (rdata[t] != {1'b0, BW'(perm[t]), AW'(ea[t])}) failures++;
        end
      for (int t = 0; t < P; t++) req_valid[t] = 0;
    end
    // a collision
    @(negedge clk);
    for (int t = 0; t < P; t++) begin req_valid[t] = 0; req_bank[t] = BW'(t); end
    req_valid[2] = 1; req_valid[5] = 1; req_bank[5] = BW'(2);
    #1;
    checks++; if (!conflict) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
