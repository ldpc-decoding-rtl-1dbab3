// tb_sdp_ram: random writes and reads against a shadow array; read data must appear exactly
// one clock after the address, and a same-cycle read of the written address returns old data.
module tb_sdp_ram;
  localparam int DEPTH = 24, WIDTH = 40;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we, re;
  logic [4:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expv;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 5'(a); wdata = {$urandom, $urandom}; shadow[a] = wdata;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      re = 1; raddr = 5'($urandom_range(0, DEPTH-1));
      we = 1'($urandom); waddr = 5'($urandom_range(0, DEPTH-1)); wdata = {$urandom, $urandom};
      expv = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata != expv) begin failures++; $display("read %0d: %h exp %h", raddr, rdata, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
