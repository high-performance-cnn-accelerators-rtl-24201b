// tb_sdp_ram: random writes and reads against an associative-array model; checks the
// one-cycle registered read and read-before-write on a same-address collision.
module tb_sdp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction
  logic        we;
  logic [6:0]  waddr, raddr;
  logic [47:0] wdata, rdata;

  sdp_ram #(.WIDTH(48), .DEPTH(100)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] model [100];
    logic [47:0] expd;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 100; a++) begin
      @(negedge clk);
      we = 1; waddr = 7'(a); wdata = {$urandom, 16'($urandom)};
      model[a] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      raddr = 7'(rnd(100));
      we    = rnd(2);
      waddr = (n % 7 == 0) ? raddr : 7'(rnd(100));
      wdata = {$urandom, 16'($urandom)};
      expd  = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expd) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h exp %h", raddr, rdata, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
