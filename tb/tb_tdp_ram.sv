// tb_tdp_ram -- the stage RAM: writes through port B, one-cycle reads on both
// ports against a shadow array, and read-first behaviour when port A reads the
// word port B writes in the same cycle.
module tb_tdp_ram;
  localparam int DW = 20, AW = 4;
  logic          clk = 0;
  logic          a_en, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_rdata, b_rdata, b_wdata;
  logic [DW-1:0] shadow [2**AW];
  int checks = 0, failures = 0;
  int n_rf = 0;

  tdp_ram #(.DW(DW), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [DW-1:0] ea, eb;
    bit ca, cb;
    foreach (shadow[i]) shadow[i] = '0;
    a_en = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; b_wdata = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a_en    = $urandom_range(0, 1);
      a_addr  = AW'($urandom);
      b_we    = $urandom_range(0, 2) == 0;
      b_en    = b_we | $urandom_range(0, 1);
      b_addr  = (i % 5 == 0) ? a_addr : AW'($urandom);
      b_wdata = DW'($urandom);
      ca = a_en; cb = b_en && !b_we;
      ea = shadow[a_addr]; eb = shadow[b_addr];
      if (a_en && b_en && b_we && a_addr == b_addr) n_rf++;
      @(posedge clk);
      if (b_en && b_we) shadow[b_addr] = b_wdata;
      #1;
      if (ca) begin checks++; if (a_rdata !== ea) begin failures++; $display("FAIL A addr %0d", a_addr); end end
      if (cb) begin checks++; if (b_rdata !== eb) begin failures++; $display("FAIL B addr %0d", b_addr); end end
    end
    checks++;
    if (n_rf == 0) begin failures++; $display("FAIL read-first case never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
