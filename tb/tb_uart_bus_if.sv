// Testbench for uart_bus_if: host write and read accesses of random length.
// Checked: one wr pulse, in the clock after the first clock of each write
// access, with the byte captured from the bus on db (the bus changes
// meanwhile), no pulse for a write without chip select, one peri_rqt pulse
// per read access and only when the receiver holds a byte, d_oe during read
// accesses only, and d_out showing the receiver byte taken at the start of
// the access.
module tb_uart_bus_if;
  import uart_bist_pkg::*;
  logic clk = 0, rst = 1, cs_n = 1, rd_n = 1, wr_n = 1;
  byte_t d_in = '0, d_out, db, rdata = '0;
  logic d_oe, wr, rx_full = 0, peri_rqt;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rqt = 0;

  uart_bus_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (wr) n_wr++;
    if (peri_rqt) n_rqt++;
  end

  initial begin
    int exp_wr = 0, exp_rqt = 0, len;
    byte_t v;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int t = 0; t < 300; t++) begin
      len = $urandom_range(1, 4);
      v = 8'($urandom);
      case ($urandom_range(0, 2))
        0: begin  // write
          cs_n <= 0; wr_n <= 0; d_in <= v;
          #1 check(!wr, "no write before the buffer is loaded");
          @(posedge clk); #1;
          d_in <= 8'($urandom);  // the buffer, not the bus, must feed db
          #1 check(wr && db == v, "write pulse with buffered data");
          check(!d_oe, "bus not driven on write");
          exp_wr++;
          repeat (len - 1) begin
            @(posedge clk); #1;
            check(!wr, "one pulse per write access");
            check(!d_oe, "bus not driven on write");
          end
        end
        1: begin  // read
          rdata <= v; rx_full <= $urandom_range(0, 1);
          cs_n <= 0; rd_n <= 0;
          #1 check(d_oe, "bus driven on read");
          check(peri_rqt == rx_full, "request only when a byte is held");
          if (rx_full) exp_rqt++;
          repeat (len) begin
            @(posedge clk); #1;
            rdata <= 8'($urandom);
            check(!peri_rqt, "one request per read access");
            check(d_oe && d_out == v, "read data held on the bus");
          end
        end
        default: begin  // strobes without chip select
          wr_n <= 0; rd_n <= 0; rx_full <= 1;
          #1 check(!wr && !peri_rqt && !d_oe, "ignored without chip select");
          @(posedge clk); #1;
          check(!wr, "no write without chip select");
        end
      endcase
      cs_n <= 1; rd_n <= 1; wr_n <= 1;
      @(posedge clk); #1;
    end
    check(n_wr == exp_wr && n_rqt == exp_rqt, $sformatf("pulses wr %0d/%0d rqt %0d/%0d", n_wr, exp_wr, n_rqt, exp_rqt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
