// Testbench of the preprocessing memory: the two write channels fill even and
// odd subcarriers in the write clock domain, then both read channels read
// every subcarrier in a read clock domain of a different frequency; data must
// come back one read clock later and unchanged. Rewrites of some entries check
// that only the addressed word changes.
module tb_prep_mem;
  import mimo_pkg::*;

  localparam int W = 40;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  logic [1:0] wr_en, rd_en;
  logic [1:0][SCW-1:0] wr_addr, rd_addr;
  logic [1:0][W-1:0] wr_data, rd_data;
  logic [W-1:0] model [NSC];

  prep_mem #(.WIDTH(W)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input int pass);
    for (int n = 0; n < NSC; n += 2) begin
      @(negedge wclk);
      wr_en = 2'b11;
      wr_addr[0] = SCW'(n);
      wr_addr[1] = SCW'(n + 1);
      wr_data[0] = {$urandom, $urandom};
      wr_data[1] = {$urandom, $urandom};
      if (pass == 1 && (n % 6 != 0)) wr_en = 2'b00;
      if (wr_en[0]) model[n] = wr_data[0];
      if (wr_en[1]) model[n+1] = wr_data[1];
    end
    @(negedge wclk);
    wr_en = 2'b00;
  endtask

  task automatic readall();
    for (int n = 0; n < NSC; n++) begin
      @(negedge rclk);
      rd_en = 2'b11;
      rd_addr[0] = SCW'(n);
      rd_addr[1] = SCW'(NSC - 1 - n);
      @(negedge rclk);
      rd_en = 2'b00;
      checks += 2;
      if (rd_data[0] !== model[n]) failures++;
      if (rd_data[1] !== model[NSC - 1 - n]) failures++;
    end
  endtask

  initial begin
    wr_en = '0; rd_en = '0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    fill(0);
    readall();
    fill(1);
    readall();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
