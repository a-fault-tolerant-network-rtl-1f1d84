// tb_mode_select: self-checking test of the node mode selection.
// With the node's own ID 5 it applies the identifiers of the published
// simulation (0x31 primary relaying, 0x62 checking-relaying, 0x52 receiving),
// then all 256 identifiers against a reference rule, with and without
// ident_valid, and checks the forwarded identifier's incremented relaying number.
module tb_mode_select;
  import brain_pkg::*;
  ident_t ident, ident_fwd;
  logic   ident_valid, mode1, mode2, mode3;
  mode_e  mode;
  int checks = 0, failures = 0;

  mode_select #(.OWN_ID(4'h5)) dut (.ident_valid, .ident, .mode1, .mode2, .mode3,
                                    .mode, .ident_fwd);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_mode(input logic [7:0] id, input logic v,
                             input logic e1, input logic e2, input logic e3);
    ident = ident_t'(id); ident_valid = v;
    #1;
    checks++;
    if ({mode1, mode2, mode3} !== {e1, e2, e3}) begin
      failures++;
      $display("FAIL id=%h v=%b modes=%b%b%b expected %b%b%b", id, v,
               mode1, mode2, mode3, e1, e2, e3);
    end
    checks++;
    if (ident_fwd !== ident_t'({id[7:4], 4'(id[3:0] + 4'd1)})) begin
      failures++;
      $display("FAIL id=%h fwd=%h", id, ident_fwd);
    end
  endtask

  initial begin
    expect_mode(8'h31, 1'b1, 1'b1, 1'b0, 1'b0);
    expect_mode(8'h62, 1'b1, 1'b0, 1'b1, 1'b0);
    expect_mode(8'h52, 1'b1, 1'b0, 1'b0, 1'b1);
    expect_mode(8'h51, 1'b1, 1'b0, 1'b0, 1'b1);  // own ID wins over number 1
    for (int i = 0; i < 256; i++) begin
      logic rx, pr;
      rx = (i[7:4] == 4'h5);
      pr = !rx && (i[3:0] == 4'h1);
      expect_mode(8'(i), 1'b1, pr, !rx && !pr, rx);
      expect_mode(8'(i), 1'b0, 1'b0, 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
