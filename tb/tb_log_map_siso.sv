// Unit test of the sliding-window log-MAP SISO. A random frame of NV bits is
// encoded by a behavioural model of the 16-state CCSDS constituent encoder
// (rate 1/2: systematic + first parity) and fed window by window, back to
// front, as the decoder expects; the last positions of the sub-block are
// marked invalid. Checks: every valid position produces exactly one output
// carrying its own tag; the extrinsic output equals the LLR minus the
// systematic term, saturated to six bits; hard decisions equal the information bits for a
// noise-free channel and for a channel with bounded noise and a few flipped
// systematic values; LLR signs agree with the decisions; the first output
// appears 2*SW+4 cycles after the first input (two windows pass before the
// backward unit starts on window 0, then three LLR pipeline stages and the
// output register).
module tb_log_map_siso;
  import turbo_pkg::*;
  localparam int SW = 8, NWIN = 4, NV = 30, TAGW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, in_valid = 0;
  logic [3:0] lc = 4'd4;
  logic [2:0] en = 3'b001;
  y_t in_ys = '0; y_t in_yp [3]; ex_t in_li = '0;
  logic [TAGW-1:0] in_tag = '0;
  sm_t alpha_init [NSTATE], beta_init [NSTATE];
  logic out_valid, out_dec, busy, done;
  logic [TAGW-1:0] out_tag;
  ex_t out_ext; llr_t out_llr;
  sm_t alpha_end [NSTATE], beta_start [NSTATE];

  log_map_siso #(.SW(SW), .NWIN(NWIN), .TAGW(TAGW)) dut (.*);

  int checks = 0, failures = 0;
  bit info [NWIN*SW];
  int ys [NWIN*SW], yp [NWIN*SW];
  int seen [NWIN*SW];
  int t_first_in, t_first_out, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic encode(int noise, int nflip);
    logic [3:0] s; bit a, p;   // s[3] = d1 ... s[0] = d4
    s = '0;
    for (int k = 0; k < NWIN*SW; k++) begin
      info[k] = 1'($urandom_range(1));
      a = info[k] ^ s[1] ^ s[0];
      p = a ^ s[3] ^ s[1] ^ s[0];
      s = {a, s[3:1]};
      ys[k] = (info[k] ? 6 : -6) + ((noise > 0) ? int'($urandom_range(2*noise)) - noise : 0);
      yp[k] = (p ? 6 : -6) + ((noise > 0) ? int'($urandom_range(2*noise)) - noise : 0);
    end
    for (int n = 0; n < nflip; n++) begin int k; k = 3 + 7 * n; ys[k] = -ys[k]; end
  endtask

  task automatic run_once(string name);
    int nout, nerr;
    for (int k = 0; k < NWIN*SW; k++) seen[k] = 0;
    nout = 0; nerr = 0; t_first_out = -1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t_first_in = cyc;
    fork
      begin
        for (int w = 0; w < NWIN; w++)
          for (int k = 0; k < SW; k++) begin
            int pos;
            pos = w * SW + (SW - 1 - k);
            in_valid = (pos < NV); in_ys = y_t'(ys[pos]); in_yp[0] = y_t'(yp[pos]);
            in_tag = TAGW'(pos);
            @(negedge clk);
          end
        in_valid = 0;
      end
      begin
        while (!done) begin
          @(posedge clk);
          if (out_valid) begin
            if (t_first_out < 0) t_first_out = cyc;
            nout++;
            seen[out_tag]++;
            checks++;
            if (out_dec !== info[out_tag]) begin nerr++; end
            checks++;
            if ((out_llr > 0) !== out_dec) failures++;
            // extrinsic = LLR - (a-priori + systematic), a-priori is 0 here
            begin
              int e;
              e = int'(out_llr) - ys[out_tag];
              e = (e > 31) ? 31 : (e < -31) ? -31 : e;
              checks++;
              if (int'(out_ext) != e) failures++;
            end
          end
        end
      end
    join
    failures += nerr;
    checks++;
    if (nout != NV) begin failures++; $display("%s: %0d outputs, expected %0d", name, nout, NV); end
    for (int k = 0; k < NV; k++) begin checks++; if (seen[k] != 1) failures++; end
    checks++;
    if (t_first_out - t_first_in != 2 * SW + 4) begin
      failures++; $display("%s: latency %0d", name, t_first_out - t_first_in);
    end
    $display("%s: %0d decision errors", name, nerr);
  endtask

  initial begin
    for (int i = 0; i < 3; i++) in_yp[i] = '0;
    for (int s = 0; s < NSTATE; s++) begin
      alpha_init[s] = (s == 0) ? sm_t'(0) : SM_MIN;
      beta_init[s] = '0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    encode(0, 0); run_once("noise-free");
    encode(0, 3); run_once("flips");
    encode(3, 3); run_once("noisy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
