// pixel_controller: sequencer of the pixel cycle.
//
// The datapath handles one left/right pixel pair per pixel cycle and evaluates one
// displacement per clock, so a pixel cycle is DISP_N + 3 clocks: 28 for the 25
// displacements of the fabricated configuration, the minimum pixel cycle of that chip.
// The phases of a cycle are:
//   phase 0            wait for `in_valid`; `in_ready` is high. The clock where both are
//                      high accepts the pixel pair (`accept`) and reads line y-2.
//   phase 1            `rd_b`: read line y-1 from the line RAM.
//   phase 2            `shift`: write the new pixels, shift the column into the banks.
//   phase 3..DISP_N+2  `search` with displacement `d` = 0..DISP_N-1, one per clock.
// `commit` is high for the one clock after the last search step (the first clock of
// the next phase 0, whether or not a pixel is waiting), so results leave the search at
// a fixed time after their pixel was accepted even when the input stalls. The phase
// split is this implementation's choice; the document gives only the 28-clock cycle.
module pixel_controller #(
  parameter int unsigned DISP_N = 25,
  localparam int unsigned DW    = $clog2(DISP_N + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       accept,
  output logic       rd_b,
  output logic       shift,
  output logic       search,
  output logic [DW-1:0] d,
  output logic       commit
);

  localparam int unsigned CYC = DISP_N + 3;
  localparam int unsigned PW  = $clog2(CYC);

  logic [PW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      commit <= 1'b0;
    end else begin
      commit <= (phase == PW'(CYC - 1));
      if (phase == '0) begin
        if (in_valid) phase <= PW'(1);
      end else if (phase == PW'(CYC - 1)) begin
        phase <= '0;
      end else begin
        phase <= phase + PW'(1);
      end
    end
  end

  always_comb begin
    in_ready = (phase == '0);
    accept   = in_ready && in_valid;
    rd_b     = (phase == PW'(1));
    shift    = (phase == PW'(2));
    search   = (phase >= PW'(3));
    d        = search ? DW'(phase - PW'(3)) : '0;
  end

endmodule
