// tb_ptm_pe: self-checking test of one inner-product step processor.
//
// The processor under test carries two k-columns of length K = 5, takes its
// operands from the external inputs for the first column and from the
// neighbour inputs for the second, and forwards a only from slot 0 and b only
// from slot 1 (FWD_A = 01, FWD_B = 10).  Random operands are fed; the
// testbench keeps its own running dot products and checks both held results,
// the fire flag, the one-step forwarding of both operands with their tags, the
// forwarding masks, an idle gap between the columns and the clear pulse.
module tb_ptm_pe;
  import ptm_pkg::*;

  localparam int DATA_W = 16;
  localparam int ACC_W  = 40;
  localparam int K      = 5;

  logic clk = 1'b0;
  logic rst_n, clear;
  a_tag_t a_nb_tag, a_ext_tag, a_out_tag;
  logic signed [DATA_W-1:0] a_nb_data, a_ext_data, b_nb_data, b_ext_data, a_out_data, b_out_data;
  logic b_nb_vld, b_ext_vld, b_out_vld, fire;
  logic signed [ACC_W-1:0] c_res [MAX_COLS];
  logic [MAX_COLS-1:0] c_done;

  int checks = 0, failures = 0;

  ptm_pe #(
    .DATA_W(DATA_W), .ACC_W(ACC_W), .NCOLS(2), .HAS_EXT_A(1'b1), .HAS_EXT_B(1'b1),
    .FWD_A(2'b01), .FWD_B(2'b10)
  ) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle_inputs();
    a_nb_tag = '0; a_ext_tag = '0; b_nb_vld = 1'b0; b_ext_vld = 1'b0;
    a_nb_data = '0; a_ext_data = '0; b_nb_data = '0; b_ext_data = '0;
  endtask

  // Run one column of K steps; ext selects the external inputs.
  task automatic run_column(input bit ext, input int slot, output longint expect_c);
    longint sum;
    logic signed [DATA_W-1:0] av, bv;
    sum = 0;
    for (int k = 1; k <= K; k++) begin
      av = DATA_W'($urandom);
      bv = DATA_W'($urandom);
      idle_inputs();
      if (ext) begin
        a_ext_tag = '{valid: 1'b1, first: (k == 1), last: (k == K)};
        a_ext_data = av; b_ext_vld = 1'b1; b_ext_data = bv;
      end else begin
        a_nb_tag = '{valid: 1'b1, first: (k == 1), last: (k == K)};
        a_nb_data = av; b_nb_vld = 1'b1; b_nb_data = bv;
      end
      #1;
      check(fire == 1'b1, "fire during a node");
      @(posedge clk);
      #1;
      sum += longint'(av) * longint'(bv);
      // Forwarded operands, one step later, masked per slot.
      check(a_out_tag.valid == (slot == 0), "a forward mask");
      check(b_out_vld == (slot == 1), "b forward mask");
      check(a_out_data == av && b_out_data == bv, "forwarded data");
      check(a_out_tag.first == (k == 1) && a_out_tag.last == (k == K), "forwarded tags");
      if (k < K) check(c_done[slot] == 1'b0, "result not yet done");
    end
    expect_c = sum;
  endtask

  longint e0, e1;

  initial begin
    rst_n = 1'b0; clear = 1'b0; idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      clear = 1'b1;
      @(posedge clk); #1;
      clear = 1'b0;
      check(c_done == 2'b00, "clear empties slots");
      run_column(1'b1, 0, e0);
      check(c_done == 2'b01, "slot 0 done");
      check(c_res[0] == ACC_W'(e0), "slot 0 result");
      // optional idle gap between columns (the array has none; PE must not care)
      if (rep % 2 == 1) begin
        idle_inputs(); #1;
        check(fire == 1'b0, "no fire when idle");
        @(posedge clk); #1;
        check(!a_out_tag.valid && !b_out_vld, "nothing forwarded when idle");
      end
      run_column(1'b0, 1, e1);
      check(c_done == 2'b11, "slot 1 done");
      check(c_res[1] == ACC_W'(e1), "slot 1 result");
      check(c_res[0] == ACC_W'(e0), "slot 0 held in place");
      idle_inputs();
      @(posedge clk); #1;
      check(c_res[0] == ACC_W'(e0) && c_res[1] == ACC_W'(e1), "results held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
