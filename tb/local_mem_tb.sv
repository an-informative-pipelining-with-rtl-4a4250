// local_mem_tb: random writes through both ports checked against a model;
// read latency of one cycle; a_re low holds the read data.
module local_mem_tb;
  localparam int DEPTH = 256;
  logic clk = 1'b0;
  logic a_re = 1'b0, a_we = 1'b0, b_we = 1'b0;
  logic [7:0] a_addr = '0, b_addr = '0;
  logic [7:0] a_wdata = '0, b_wdata = '0, a_rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  local_mem #(.DEPTH(DEPTH), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] last;
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_we = 1; a_addr = 8'(i); a_wdata = 8'($urandom); model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    // port B overwrites some locations
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); b_we = 1; b_addr = 8'($urandom); b_wdata = 8'($urandom); model[b_addr] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    // read everything back
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_re = 1; a_addr = 8'(i);
      @(negedge clk); a_re = 0;
      checks++;
      if (a_rdata !== model[i]) begin failures++; $display("addr %0d got %h exp %h", i, a_rdata, model[i]); end
      last = a_rdata;
      a_addr = 8'(i + 7);
      @(negedge clk);
      checks++;
      if (a_rdata !== last) begin failures++; $display("read data not held with a_re low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
