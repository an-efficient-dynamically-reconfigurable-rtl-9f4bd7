// tb_ios_buffer: self-checking test of the scheduler buffer.
// Writes random patterns of all three precisions and pops at random. Checks
// that every precision group comes out in write order, that the read side
// only leaves a group once that group's queue has run empty, that space_ok
// follows the fill level and that nothing is lost.
module tb_ios_buffer;
  import mp_pkg::*;
  localparam int DEPTH = 8, RESERVE = 2;
  logic clk = 0, rst_n = 0;
  logic wr_valid, rd_pop, space_ok, rd_valid, empty;
  pattern_t wr_data, rd_data;
  int checks = 0, failures = 0;
  int switches = 0, pops = 0;

  ios_buffer #(.DEPTH(DEPTH), .RESERVE(RESERVE)) dut (
    .clk(clk), .rst_n(rst_n), .wr_valid(wr_valid), .wr_data(wr_data), .space_ok(space_ok),
    .rd_valid(rd_valid), .rd_data(rd_data), .rd_pop(rd_pop), .empty(empty));

  always #5 clk = ~clk;

  pattern_t q [3][$];
  bit       ran_empty [3];

  function automatic int qi(prec_e p);
    return (p == PREC_8) ? 1 : (p == PREC_4) ? 2 : 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last = -1, c;
    logic do_pop;
    wr_valid = 0; rd_pop = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // bursts of writes and reads so that queues fill and drain
      wr_valid = (i % 400 < 200) ? ($urandom % 3 != 0) : ($urandom % 4 == 0);
      wr_data = '0;
      wr_data.a = 16'($urandom); wr_data.b = 16'($urandom);
      wr_data.prec = ($urandom % 3 == 0) ? PREC_4 : ($urandom % 2 == 0) ? PREC_8 : PREC_16;
      wr_data.fcode = 3'($urandom);
      if (q[qi(wr_data.prec)].size() >= DEPTH) wr_valid = 0;
      do_pop = ($urandom % 2 == 0);
      rd_pop = do_pop;
      #1;
      checks++;
      if (space_ok !== (q[0].size() + RESERVE < DEPTH && q[1].size() + RESERVE < DEPTH
                        && q[2].size() + RESERVE < DEPTH)) begin
        failures++; $display("FAIL space_ok at %0d", i);
      end
      checks++;
      if (empty !== (q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0)) begin
        failures++; $display("FAIL empty at %0d", i);
      end
      if (rd_pop && rd_valid) begin
        c = qi(rd_data.prec);
        checks++;
        if (q[c].size() == 0 || rd_data !== q[c][0]) begin
          failures++; $display("FAIL pop at %0d: wrong pattern", i);
        end else void'(q[c].pop_front());
        if (last >= 0 && c != last) begin
          switches++;
          checks++;
          if (!ran_empty[last]) begin failures++; $display("FAIL left group %0d before it ran empty", last); end
        end
        if (c != last) for (int k = 0; k < 3; k++) ran_empty[k] = 0;
        last = c;
        pops++;
      end
      if (wr_valid) q[qi(wr_data.prec)].push_back(wr_data);
      for (int k = 0; k < 3; k++) if (q[k].size() == 0) ran_empty[k] = 1;
      @(posedge clk);
    end
    checks++;
    if (switches < 5 || pops < 100) begin failures++; $display("FAIL too little exercised"); end
    $display("pops=%0d group switches=%0d", pops, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
