// tb_poly_mem: random multi-port reads and writes against a reference array
// kept here; checks one-cycle read latency and read-before-write behaviour.
module tb_poly_mem;
  localparam int W = 24, D = 64, NR = 3, NW = 2, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] raddr [NR];
  logic [W-1:0]  rdata [NR];
  logic          we [NW];
  logic [AW-1:0] waddr [NW];
  logic [W-1:0]  wdata [NW];
  logic [W-1:0]  model [D];
  logic [W-1:0]  expd [NR];
  int checks = 0, failures = 0;

  poly_mem #(.WIDTH(W), .DEPTH(D), .NR(NR), .NW(NW)) dut (.*);

  initial begin
    for (int w = 0; w < NW; w++) we[w] = 0;
    for (int r = 0; r < NR; r++) raddr[r] = 0;
    // fill
    for (int a = 0; a < D; a += NW) begin
      @(negedge clk);
      for (int w = 0; w < NW; w++) begin
        we[w] = 1; waddr[w] = AW'(a + w); wdata[w] = W'($urandom); model[a + w] = wdata[w];
      end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin raddr[r] = AW'($urandom); expd[r] = model[raddr[r]]; end
      // distinct write addresses
      waddr[0] = AW'($urandom); waddr[1] = waddr[0] ^ AW'(1 + ($urandom % (D - 1)));
      for (int w = 0; w < NW; w++) begin
        we[w] = $urandom % 2; wdata[w] = W'($urandom);
      end
      @(posedge clk);
      for (int w = 0; w < NW; w++) if (we[w]) model[waddr[w]] = wdata[w];
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] !== expd[r]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d addr %0d got %h exp %h", r, raddr[r], rdata[r], expd[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
