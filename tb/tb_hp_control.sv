// tb_hp_control: runs the HP master against a behavioural DDR model that
// stalls every channel at random. Reads of random sizes from random
// addresses (some just below a 4 KB page end) must deliver every beat in
// order with the right data, lane mask and last flag; writes of random
// sizes to random word addresses (odd and even) must leave the expected
// words in memory, must not touch the words on either side, and must finish with wr_done only after all
// responses. No burst may exceed 16 beats, cross 4 KB, or misplace wlast.
module tb_hp_control;
  import ssa_pkg::*;

  localparam int unsigned DEPTH = 8192;   // 64 KB of model memory

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  axi_hp_req_t      hp_req;
  axi_hp_rsp_t      hp_rsp;
  logic             wr_off, rd_start, wr_start, out_valid, out_ready, out_last, rd_done, wr_done, error;
  addr_t            src_addr, dst_addr;
  logic [31:0]      n_words, wr_words, wr_beat_idx;
  beat_t            out_data, wr_beat_data;
  logic [LANES-1:0] out_keep;
  int n_rd_bursts, n_wr_bursts, n_stalls, n_bad_bursts;
  int checks = 0, failures = 0;

  hp_control dut (.*);
  axi_hp_mem_model #(.DEPTH(DEPTH)) u_mem (.clk, .rst_n, .req(hp_req), .rsp(hp_rsp),
    .n_rd_bursts, .n_wr_bursts, .n_stalls, .n_bad_bursts);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic beat_t pattern(logic [31:0] i, logic [31:0] salt);
    return {(i * 32'h9E3779B1) ^ salt, (i * 32'h85EBCA6B) + salt};
  endfunction

  // word j of the write is word_pattern(j); lane l of beat b is word 2b + l - wr_off
  function automatic item_t word_pattern(logic [31:0] j);
    return (j * 32'h9E3779B1) ^ 32'h5A5A0000;
  endfunction
  assign wr_beat_data = {word_pattern({wr_beat_idx[30:0], 1'b1} - 32'(wr_off)),
                         word_pattern({wr_beat_idx[30:0], 1'b0} - 32'(wr_off))};

  initial begin
    rd_start = 0; wr_start = 0; out_ready = 0; src_addr = '0; dst_addr = '0;
    n_words = '0; wr_words = '0;
    for (int i = 0; i < int'(DEPTH); i++) u_mem.mem[i] = pattern(i, 32'h1234);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int beats, got;
      bit saw_last;
      n_words  = (t == 0) ? 1 : $urandom_range(1, 300);
      src_addr = (t % 5 == 1) ? 32'h0000_0FE8 : addr_t'($urandom_range(0, 2048) * 8);
      beats    = (int'(n_words) + 1) / 2;
      @(negedge clk); rd_start = 1; @(negedge clk); rd_start = 0;
      got = 0; saw_last = 0;
      while (!saw_last) begin
        out_ready = ($urandom_range(0, 3) != 0);
        @(posedge clk);
        if (out_valid && out_ready) begin
          int a;
          a = (int'(src_addr) / 8 + got) % DEPTH;
          check(out_data == u_mem.mem[a], $sformatf("read beat %0d", got));
          check(out_last == (got == beats - 1), "out_last");
          check(out_keep == ((got == beats - 1 && n_words[0]) ? 2'b01 : 2'b11), "out_keep");
          check(rd_done == out_last, "rd_done");
          saw_last = out_last;
          got++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      check(got == beats, "beat count");
    end
    for (int t = 0; t < 24; t++) begin
      int cyc;
      logic [31:0] w0;
      wr_words = (t == 0) ? 1 : $urandom_range(1, 200);
      // word-aligned destinations, odd and even, some near a page end
      dst_addr = (t % 4 == 1) ? 32'h0000_1FF4 : addr_t'($urandom_range(0, 4096) * 4);
      w0 = dst_addr / 4;
      @(negedge clk); wr_start = 1; @(negedge clk); wr_start = 0;
      cyc = 0;
      while (!wr_done && cyc < 5000) begin @(negedge clk); cyc++; end
      check(wr_done, "wr_done");
      // words just outside the range keep the old pattern
      for (int j = -1; j <= int'(wr_words); j++) begin
        logic [31:0] a;
        beat_t old, now;
        item_t got, want;
        a   = w0 + 32'(j);
        old = pattern(a / 2, 32'h1234);
        now = u_mem.mem[a / 2];
        got  = a[0] ? now[63:32] : now[31:0];
        want = (j < 0 || j >= int'(wr_words)) ? (a[0] ? old[63:32] : old[31:0])
                                              : word_pattern(32'(j));
        check(got == want, $sformatf("write %0d words at %h: word %0d", wr_words, dst_addr, j));
      end
      // restore the pattern for later runs
      for (int b = 0; b < int'(wr_words) / 2 + 3; b++)
        u_mem.mem[w0 / 2 + b] = pattern(w0 / 2 + b, 32'h1234);
    end
    check(n_bad_bursts == 0, "burst rules");
    check(n_stalls > 0, "memory stalled");
    check(error == 0, "no error");
    $display("bursts: %0d read, %0d write", n_rd_bursts, n_wr_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
