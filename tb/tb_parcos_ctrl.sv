// tb_parcos_ctrl: self-checking test of the Row Select Register and bus
// decoding. In random order it issues WR1 to the RSR and to CPC bytes, WR2
// (reswitch), PR (reload), RD of bytes and of the RSR, idle cycles and cycles
// with the chip not selected. A testbench copy of the RSR predicts every
// decoded output: CPC write enable/row/column/data, the word row offered to
// the CPR, the CPR load, and the read data.
module tb_parcos_ctrl;
  import parcos_pkg::*;

  logic       clk = 0, rst_n, cs;
  acu_bus_t   bus;
  logic       cpc_we, cpr_load, rd_oe;
  logic [4:0] cpc_row, cpc_col, cpc_wdata, cpc_rdata, word_row;
  data_t      rd_data;
  logic [4:0] rsr_m;
  int checks = 0, failures = 0;
  int n_op [6];

  parcos_ctrl dut (.clk, .rst_n, .cs, .bus, .cpc_we, .cpc_row, .cpc_col, .cpc_wdata,
                   .cpc_rdata, .word_row, .cpr_load, .rd_data, .rd_oe);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic idle();
    bus = '0; cs = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op;
    logic sel;
    rst_n = 0; idle(); cpc_rdata = 0;
    #12 rst_n = 1;
    rsr_m = 0;
    expect_eq("rsr after reset", cpc_row, 0);
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      op = $urandom_range(5);
      sel = (op != 5);                  // op 5: strobe with chip not selected
      n_op[op]++;
      bus = '0;
      cs = sel;
      bus.data = 5'($urandom);
      cpc_rdata = 5'($urandom);
      case (op)
        0: begin bus.wr1 = 1; bus.addr = RSR_ADDR | addr_t'($urandom_range(31)); end
        1: begin bus.wr1 = 1; bus.addr = addr_t'($urandom_range(31)); end
        2: begin bus.wr2 = 1; bus.addr = RSR_ADDR; end
        3: begin bus.pr = 1; end
        4: begin bus.rd = 1; bus.addr = addr_t'($urandom_range(63)); end
        default: begin
          bus.addr = addr_t'($urandom_range(63));
          case ($urandom_range(3)) 0: bus.wr1 = 1; 1: bus.wr2 = 1; 2: bus.rd = 1; default: bus.pr = 1; endcase
        end
      endcase
      #1;
      expect_eq("cpc_we", cpc_we, op == 1);
      expect_eq("cpr_load", cpr_load, op == 2 || op == 3);
      expect_eq("rd_oe", rd_oe, op == 4);
      expect_eq("cpc_row", cpc_row, rsr_m);
      if (op == 1) begin
        expect_eq("cpc_col", cpc_col, bus.addr[4:0]);
        expect_eq("cpc_wdata", cpc_wdata, bus.data);
      end
      if (op == 2) expect_eq("word_row on reswitch", word_row, bus.data);
      if (op == 3) expect_eq("word_row on reload", word_row, rsr_m);
      if (op == 4) begin
        if (bus.addr[5]) expect_eq("read rsr", rd_data, rsr_m);
        else begin
          expect_eq("cpc_col on read", cpc_col, bus.addr[4:0]);
          expect_eq("read byte", rd_data, cpc_rdata);
        end
      end
      if (op == 0 || op == 2) rsr_m = bus.data;
      @(negedge clk);
      idle();
      #1;
      expect_eq("rsr after op", cpc_row, rsr_m);
      expect_eq("idle cpc_we", cpc_we, 0);
      expect_eq("idle cpr_load", cpr_load, 0);
      expect_eq("idle rd_oe", rd_oe, 0);
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("FAIL operation %0d never issued", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
