// tb_dual_port_mem: self-checking test of the dual-port memory.
// Both ports issue random reads and writes every cycle; each read is checked one cycle
// later against a model array (old data when the other port writes the same word), and
// same-word writes from both ports must keep port a's data.
module tb_dual_port_mem;
  localparam int unsigned WORDS = 512;
  localparam int unsigned AW    = 9;

  logic clk = 1'b0;
  logic a_en = 1'b0, a_we = 1'b0, b_en = 1'b0, b_we = 1'b0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [31:0]   a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0, collisions = 0;
  logic [31:0] model [WORDS];

  dual_port_mem #(.WORDS(WORDS)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                      .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

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
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic        ra, rb;
    logic [31:0] ea, eb;
    // fill the memory through both ports
    for (int i = 0; i < WORDS; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i);     a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = AW'(i + 1); b_wdata = $urandom;
      model[i] = a_wdata;
      model[i+1] = b_wdata;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = AW'($urandom % 32); a_wdata = $urandom;
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = AW'($urandom % 32); b_wdata = $urandom;
      if ($urandom % 4 == 0) b_addr = a_addr;
      ra = a_en && !a_we;
      rb = b_en && !b_we;
      ea = model[a_addr];
      eb = model[b_addr];
      if (b_en && b_we) model[b_addr] = b_wdata;
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) collisions++;
      @(posedge clk);
      #1;
      if (ra) check(a_rdata == ea, "port a read");
      if (rb) check(b_rdata == eb, "port b read");
    end
    @(negedge clk);
    a_en = 0; b_en = 0;
    // read back everything through port b
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 0; b_addr = AW'(i);
      @(posedge clk);
      #1;
      check(b_rdata == model[i], "final contents");
    end
    check(collisions > 0, "no write collision was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
