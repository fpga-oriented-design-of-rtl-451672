// tb_tile_mem: random writes and reads on all read ports of a local tile memory at its default
// size, checked against a shadow array: read data one clock after the address, old data on a
// read of the address being written.
module tb_tile_mem;
  localparam int DEPTH = 756, NRD = 3, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;

  logic          we = 0;
  logic [AW-1:0] wr_addr = '0;
  logic [31:0]   wr_data = '0;
  logic [AW-1:0] rd_addr [NRD];
  logic [31:0]   rd_data [NRD];

  tile_mem #(.DEPTH(DEPTH), .NRD(NRD)) dut (.*);

  logic [31:0] shadow [DEPTH];
  logic [31:0] expd [NRD];
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NRD; k++) rd_addr[k] = '0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wr_addr = AW'(a); wr_data = $urandom; shadow[a] = wr_data;
    end
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      for (int k = 0; k < NRD; k++) begin
        rd_addr[k] = AW'($urandom % DEPTH);
        expd[k]    = shadow[rd_addr[k]];
      end
      we      = ($urandom % 2) != 0;
      wr_addr = (it % 5 == 0) ? rd_addr[0] : AW'($urandom % DEPTH);
      wr_data = $urandom;
      @(posedge clk);
      if (we) shadow[wr_addr] = wr_data;
      #1;
      for (int k = 0; k < NRD; k++) begin
        checks++;
        if (rd_data[k] != expd[k]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d addr %0d: %h expected %h", k, rd_addr[k], rd_data[k], expd[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
