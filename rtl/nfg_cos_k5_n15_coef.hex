7000fc78e0b2151d39cc833ab8ea02d412
