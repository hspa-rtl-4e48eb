// tb_sdp_ram: checks the simple dual-port memory against an array model:
// random writes and reads, read data one cycle after re, rdata held while
// re = 0, and a read of the address being written returning the old word.
module tb_sdp_ram;
  localparam int unsigned WIDTH = 128, DEPTH = 139, AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic             we, re;
  logic [AW-1:0]    waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  function automatic logic [WIDTH-1:0] rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    logic [WIDTH-1:0] expect_q, held;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    // fill
    for (int a = 0; a < int'(DEPTH); a++) begin
      model[a] = rnd();
      we <= 1; waddr <= AW'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 0;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      int unsigned ra, wa;
      bit dr, dw;
      ra = $urandom() % DEPTH; wa = (i % 7 == 0) ? ra : $urandom() % DEPTH;
      dr = ($urandom() % 4) != 0; dw = ($urandom() % 2) != 0;
      re <= dr; raddr <= AW'(ra);
      we <= dw; waddr <= AW'(wa); wdata <= rnd();
      held = rdata;
      expect_q = model[ra];            // old data, even when written now
      @(posedge clk);
      #1;
      if (dw) model[wa] = wdata;
      checks++;
      if (dr ? (rdata !== expect_q) : (rdata !== held)) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d: re=%0d addr=%0d got %h", i, dr, ra, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
