// tb_sync_fifo: self-checking test of the synchronous FIFO.
// Random pushes and pops (including both at once, pushes when full and pops when empty)
// are checked each cycle against a queue model: head data, full, empty and count.
module tb_sync_fifo;
  localparam int unsigned W = 32;
  localparam int unsigned D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int fulls = 0, empties = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .full,
                                          .empty, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (model size %0d)", what, model.size());
    end
  endtask

  initial begin
    int bias;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // compare outputs with the model
      check(count == ($clog2(D+1))'(model.size()), "count");
      check(full == (model.size() == D), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() != 0) check(rdata == model[0], "head data");
      if (full) fulls++;
      if (empty) empties++;
      // phases that fill, drain, and mix
      bias  = ((i / 500) % 3 == 0) ? 80 : ((i / 500) % 3 == 1) ? 20 : 50;
      push  = ($urandom % 100) < bias;
      pop   = ($urandom % 100) >= bias;
      if ($urandom % 8 == 0) begin push = 1'b1; pop = 1'b1; end
      wdata = $urandom;
      begin
        int  sz;
        sz = model.size();
        @(posedge clk);
        #1;
        // update the model with what the FIFO accepted, judged on the state before the edge
        if (pop && sz != 0) void'(model.pop_front());
        if (push && sz < D) model.push_back(wdata);
      end
    end
    check(fulls > 0, "FIFO never became full");
    check(empties > 0, "FIFO never became empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
