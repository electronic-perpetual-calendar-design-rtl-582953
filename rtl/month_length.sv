// month_length: number of days in the current month.
//
// Combinational. From the BCD month and the BCD two-digit year it gives
// the month-length code used by day_counter: 31 days for months 1, 3, 5,
// 7, 8, 10, 12; 30 for 4, 6, 9, 11; and for February 29 in a leap year,
// else 28. The year is taken as 2000-2099, where every year divisible by
// four is a leap year (2000 is one, being divisible by 400). For BCD
// digits T (tens) and U (units), 10*T+U is divisible by four exactly when
// T is even and U is 0, 4 or 8, or T is odd and U is 2 or 6, so only the
// lowest bit of the tens digit is read.
//
// That the day counter needs the month length follows the original design;
// the decoding logic and the century are this design's own.
module month_length (
  input  logic [7:0]         month,    // BCD 01..12
  input  logic [7:0]         year,     // BCD 00..99
  output logic               leap,
  output cal_pkg::max_days_e max_days
);
  import cal_pkg::*;

  always_comb begin
    if (!year[4]) leap = (year[3:0] == 4'd0) || (year[3:0] == 4'd4) || (year[3:0] == 4'd8);
    else          leap = (year[3:0] == 4'd2) || (year[3:0] == 4'd6);
  end

  always_comb begin
    case (month)
      8'h04, 8'h06, 8'h09, 8'h11: max_days = DAYS_30;
      8'h02:                      max_days = leap ? DAYS_29 : DAYS_28;
      default:                    max_days = DAYS_31;
    endcase
  end

endmodule
