// prom_tap_model: behavioural stand-in for the flash PROM's JTAG port
// (behavioural model, testbench only; not the real part's register set).
//
// An IEEE 1149.1 TAP controller written out state by state, an 8-bit
// instruction register that captures 8'b0000_0001, and three data registers:
// BYPASS (1 bit, captures 0, selected by 8'hFF and unknown codes), IDCODE
// (32 bits, 8'h01, selected after Test-Logic-Reset) and a 16-bit DATA cell
// (8'h02) that captures its stored word and stores what was shifted in on
// Update-DR, so that a write can be read back. Registers shift toward bit 0
// on rising TCK, TDI entering at the top; TDO presents bit 0 and changes on
// falling TCK. Counters expose what happened for the testbenches.
module prom_tap_model #(
  parameter logic [31:0] IDCODE = 32'h5502_6093
) (
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  output logic        tdo,
  output logic [3:0]  state,
  output logic [7:0]  ir,
  output logic [15:0] data_cell,
  output int          idle_tcks,
  output int          reset_tcks,
  output int          tck_edges,
  output int          dr_updates,
  output int          ir_updates
);

  localparam logic [3:0] S_E2D = 4'h0, S_E1D = 4'h1, S_SHD = 4'h2, S_PSD = 4'h3,
                         S_SLI = 4'h4, S_UPD = 4'h5, S_CPD = 4'h6, S_SLD = 4'h7,
                         S_E2I = 4'h8, S_E1I = 4'h9, S_SHI = 4'hA, S_PSI = 4'hB,
                         S_RTI = 4'hC, S_UPI = 4'hD, S_CPI = 4'hE, S_TLR = 4'hF;

  logic [7:0]  ir_sh;
  logic [31:0] dr_sh;
  int          dr_len;

  initial begin
    state = S_TLR; ir = 8'h01; data_cell = 16'h0000; tdo = 1'b0;
    ir_sh = '0; dr_sh = '0; dr_len = 32;
    idle_tcks = 0; reset_tcks = 0; tck_edges = 0; dr_updates = 0; ir_updates = 0;
  end

  function automatic int len_of(input logic [7:0] i);
    case (i)
      8'h01:   return 32;
      8'h02:   return 16;
      default: return 1;
    endcase
  endfunction

  always @(posedge tck) begin
    tck_edges = tck_edges + 1;
    if (state == S_RTI) idle_tcks = idle_tcks + 1;
    if (state == S_TLR) reset_tcks = reset_tcks + 1;
    // register actions of the present state
    case (state)
      S_CPI: ir_sh = 8'b0000_0001;
      S_SHI: ir_sh = {tdi, ir_sh[7:1]};
      S_CPD: begin
        dr_len = len_of(ir);
        case (ir)
          8'h01:   dr_sh = IDCODE;
          8'h02:   dr_sh = {16'h0, data_cell};
          default: dr_sh = 32'h0;
        endcase
      end
      S_SHD: begin
        dr_sh = dr_sh >> 1;
        dr_sh[dr_len-1] = tdi;
      end
      S_UPI: begin ir = ir_sh; ir_updates = ir_updates + 1; end
      S_UPD: begin
        dr_updates = dr_updates + 1;
        if (ir == 8'h02) data_cell = dr_sh[15:0];
      end
      default: ;
    endcase
    // next state
    case (state)
      S_TLR: state = tms ? S_TLR : S_RTI;
      S_RTI: state = tms ? S_SLD : S_RTI;
      S_SLD: state = tms ? S_SLI : S_CPD;
      S_CPD: state = tms ? S_E1D : S_SHD;
      S_SHD: state = tms ? S_E1D : S_SHD;
      S_E1D: state = tms ? S_UPD : S_PSD;
      S_PSD: state = tms ? S_E2D : S_PSD;
      S_E2D: state = tms ? S_UPD : S_SHD;
      S_UPD: state = tms ? S_SLD : S_RTI;
      S_SLI: state = tms ? S_TLR : S_CPI;
      S_CPI: state = tms ? S_E1I : S_SHI;
      S_SHI: state = tms ? S_E1I : S_SHI;
      S_E1I: state = tms ? S_UPI : S_PSI;
      S_PSI: state = tms ? S_E2I : S_PSI;
      S_E2I: state = tms ? S_UPI : S_SHI;
      S_UPI: state = tms ? S_SLD : S_RTI;
      default: state = S_TLR;
    endcase
    if (state == S_TLR) ir = 8'h01;
  end

  always @(negedge tck) begin
    if (state == S_SHI)      tdo <= ir_sh[0];
    else if (state == S_SHD) tdo <= dr_sh[0];
    else                     tdo <= 1'b0;
  end

endmodule
